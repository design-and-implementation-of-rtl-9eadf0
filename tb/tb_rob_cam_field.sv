// tb_rob_cam_field: checks the four-port, block-shifting CAM field at its
// full size (32 rows of 5 bits) against an array model. The field is
// loaded through the shift path, then shifts or holds at random while four
// keys, often picked from stored words so that several rows match, are
// compared. Every match bit and every stored word is checked.
module tb_rob_cam_field;
  localparam int unsigned N = 32, B = 4, W = 5, P = 4;
  logic clk = 1'b0, shift;
  logic [B-1:0][W-1:0] new_block;
  logic [P-1:0][W-1:0] key;
  logic [P-1:0][N-1:0] match;
  logic [N-1:0][W-1:0] word;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0, multi = 0;

  rob_cam_field #(.ENTRIES(N), .BLOCK(B), .WIDTH(W), .PORTS(P)) dut (
    .clk, .shift, .new_block, .key, .match, .word);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 1'b1; key = '0;
    for (int b = 0; b < N / B; b++) begin
      for (int k = 0; k < B; k++) new_block[k] = W'($urandom);
      for (int i = N - 1; i >= B; i--) model[i] = model[i-B];
      for (int k = 0; k < B; k++) model[k] = new_block[k];
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      shift = $urandom_range(0, 1)[0];
      for (int k = 0; k < B; k++) new_block[k] = W'($urandom);
      for (int p = 0; p < P; p++)
        key[p] = ($urandom_range(0, 3) != 0) ? model[$urandom_range(0, N - 1)] : W'($urandom);
      #1;
      for (int p = 0; p < P; p++) begin
        int hits;
        hits = 0;
        for (int i = 0; i < N; i++) begin
          logic e;
          e = (model[i] == key[p]);
          hits += int'(e);
          checks++;
          if (match[p][i] !== e) begin
            failures++;
            $display("t=%0d port %0d row %0d match %b exp %b", t, p, i, match[p][i], e);
          end
        end
        if (hits > 1) multi++;
      end
      if (shift) begin
        for (int i = N - 1; i >= B; i--) model[i] = model[i-B];
        for (int k = 0; k < B; k++) model[k] = new_block[k];
      end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (word[i] !== model[i]) begin
          failures++;
          $display("t=%0d row %0d word %h exp %h", t, i, word[i], model[i]);
        end
      end
    end
    if (multi == 0) begin failures++; $display("coverage: no multiple match"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
