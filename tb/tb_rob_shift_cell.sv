// tb_rob_shift_cell: random stimulus for the shift/storage cell, checked
// against a one-line reference after every clock edge. Covers hold (stall),
// shift, in-place update, shift-over-update priority, and the synchronous
// reset of the resettable variant (a second instance without reset must
// ignore `rst`).
module tb_rob_shift_cell;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst, shift, upd;
  logic [W-1:0] shift_in, upd_val, q_r, q_n, exp_r, exp_n;
  int checks = 0, failures = 0;

  rob_shift_cell #(.WIDTH(W), .RESETTABLE(1'b1)) dut_r (
    .clk, .rst, .shift, .shift_in, .upd, .upd_val, .q (q_r));
  rob_shift_cell #(.WIDTH(W), .RESETTABLE(1'b0)) dut_n (
    .clk, .rst, .shift, .shift_in, .upd, .upd_val, .q (q_n));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; shift = 1'b1; upd = 1'b0; shift_in = 8'h5a; upd_val = '0;
    @(posedge clk); #1;
    exp_r = 8'h5a; exp_n = 8'h5a;
    for (int t = 0; t < 2000; t++) begin
      rst      = ($urandom_range(0, 15) == 0);
      shift    = $urandom_range(0, 1)[0];
      upd      = $urandom_range(0, 1)[0];
      shift_in = W'($urandom);
      upd_val  = W'($urandom);
      @(posedge clk); #1;
      if (rst)        exp_r = '0;
      else if (shift) exp_r = shift_in;
      else if (upd)   exp_r = upd_val;
      if (shift)      exp_n = shift_in;
      else if (upd)   exp_n = upd_val;
      checks += 2;
      if (q_r !== exp_r) begin failures++; $display("resettable: got %h exp %h", q_r, exp_r); end
      if (q_n !== exp_n) begin failures++; $display("plain: got %h exp %h", q_n, exp_n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
