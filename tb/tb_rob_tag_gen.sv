// tb_rob_tag_gen: checks the tag generator of the reorder buffer. After
// reset the tags are {0, slot}; the block count steps only on a shift, and
// the 32 tags of any eight consecutive shifted blocks (one full buffer) are
// all different.
module tb_rob_tag_gen;
  logic clk = 1'b0, rst, shift;
  logic [3:0][4:0] tag;
  int checks = 0, failures = 0;
  int unsigned count;
  logic [4:0] window [$];

  rob_tag_gen #(.BLOCKS(8), .BLOCK(4), .TAG_W(5)) dut (.clk, .rst, .shift, .tag);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; shift = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0; count = 0;
    for (int t = 0; t < 500; t++) begin
      shift = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (tag[k] !== 5'(count * 4 + k)) begin
          failures++;
          $display("t=%0d slot %0d tag %0d expected %0d", t, k, tag[k], count * 4 + k);
        end
      end
      if (shift) begin
        for (int k = 0; k < 4; k++) window.push_back(tag[k]);
        while (window.size() > 32) void'(window.pop_front());
        if (window.size() == 32) begin
          checks++;
          for (int a = 0; a < 32; a++)
            for (int b = a + 1; b < 32; b++)
              if (window[a] == window[b]) begin
                failures++;
                $display("t=%0d duplicate tag %0d in flight", t, window[a]);
              end
        end
        count = (count + 1) % 8;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
