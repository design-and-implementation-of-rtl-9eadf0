// tb_rob_valid_field: checks the valid bits against a model. After reset
// every row is invalid; random groups shift in; now and then one or two
// rows are flagged and every row above the lowest flagged row must be
// cleared on the same edge, with or without a shift, while the flagged
// rows themselves stay. `valid_kept` must show the cleared result early.
module tb_rob_valid_field;
  localparam int unsigned N = 32, B = 4;
  logic clk = 1'b0, rst, shift;
  logic [B-1:0] new_valid;
  logic [N-1:0] squash_row, valid, valid_kept, model, kept;
  int checks = 0, failures = 0, squashes = 0;

  rob_valid_field #(.ENTRIES(N), .BLOCK(B)) dut (
    .clk, .rst, .shift, .new_valid, .squash_row, .valid, .valid_kept);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; shift = 1'b0; new_valid = '0; squash_row = '0;
    @(posedge clk); #1;
    checks++;
    if (valid !== '0) begin failures++; $display("not empty after reset"); end
    rst = 1'b0; model = '0;
    for (int t = 0; t < 3000; t++) begin
      int lowest;
      shift = ($urandom_range(0, 3) != 0);
      new_valid = B'($urandom);
      squash_row = '0;
      if ($urandom_range(0, 5) == 0) begin
        squash_row[$urandom_range(0, N - 1)] = 1'b1;
        if ($urandom_range(0, 1) == 0) squash_row[$urandom_range(0, N - 1)] = 1'b1;
      end
      lowest = -1;
      for (int i = 0; i < N; i++) if (squash_row[i]) lowest = i;
      kept = model;
      if (lowest >= 0) begin
        squashes++;
        for (int i = 0; i < lowest; i++) kept[i] = 1'b0;
      end
      #1;
      checks++;
      if (valid_kept !== kept) begin
        failures++;
        $display("t=%0d valid_kept %h exp %h", t, valid_kept, kept);
      end
      if (shift) model = {kept[N-B-1:0], new_valid};
      else       model = kept;
      @(posedge clk); #1;
      checks++;
      if (valid !== model) begin
        failures++;
        $display("t=%0d valid %h exp %h", t, valid, model);
      end
    end
    if (squashes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
