// tb_rob_lookup: drives the lookup array with exhaustive single and double
// matches and with random match vectors of every density, and checks that
// exactly the lowest-numbered (topmost, most current) match survives.
module tb_rob_lookup;
  localparam int unsigned N = 32;
  logic [N-1:0] match_in, match_out, exp;
  int checks = 0, failures = 0;

  rob_lookup #(.ENTRIES(N)) dut (.match_in, .match_out);

  function automatic logic [N-1:0] topmost(logic [N-1:0] m);
    for (int i = 0; i < N; i++) if (m[i]) return N'(1) << i;
    return '0;
  endfunction

  task automatic check_one(logic [N-1:0] m);
    match_in = m;
    #1;
    exp = topmost(m);
    checks++;
    if (match_out !== exp) begin
      failures++;
      $display("in %h out %h expected %h", m, match_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    for (int a = 0; a < N; a++) begin
      check_one(N'(1) << a);
      for (int b = a + 1; b < N; b++) check_one((N'(1) << a) | (N'(1) << b));
    end
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] m;
      m = N'($urandom);
      case (t % 4)
        0: m = m & N'($urandom) & N'($urandom);
        1: m = m & N'($urandom);
        default: ;
      endcase
      check_one(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
