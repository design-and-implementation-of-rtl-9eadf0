// tb_rob_ram_field: checks the multi-port, block-shifting RAM field at its
// full size (32 rows of 32 bits, four write and eight read ports) against
// an array model. Each cycle up to four ports write distinct random rows,
// eight ports read random rows (or none), and the field randomly shifts
// or holds. Reads must return the word after this cycle's writes, the
// bottom block output must show the updated bottom rows, and after the
// edge every row must hold its own word (hold) or the word of the row four
// above (shift), with the new block in the top four rows.
module tb_rob_ram_field;
  localparam int unsigned N = 32, B = 4, W = 32, WP = 4, RP = 8;
  logic clk = 1'b0, shift;
  logic [B-1:0][W-1:0]  new_block, out_block;
  logic [WP-1:0][N-1:0] wr_wl;
  logic [WP-1:0][W-1:0] wr_data;
  logic [RP-1:0][N-1:0] rd_wl;
  logic [RP-1:0][W-1:0] rd_data;
  logic [W-1:0] model [N];
  logic [W-1:0] upd   [N];
  int checks = 0, failures = 0;
  int shifts = 0, same_cycle_reads = 0;

  rob_ram_field #(.ENTRIES(N), .BLOCK(B), .WIDTH(W), .WR_PORTS(WP), .RD_PORTS(RP)) dut (
    .clk, .shift, .new_block, .wr_wl, .wr_data, .rd_wl, .rd_data, .out_block);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row through the shift path
    wr_wl = '0; rd_wl = '0; wr_data = '0; shift = 1'b1;
    for (int b = 0; b < N / B; b++) begin
      for (int k = 0; k < B; k++) new_block[k] = W'($urandom);
      for (int i = N - 1; i >= B; i--) model[i] = model[i-B];
      for (int k = 0; k < B; k++) model[k] = new_block[k];
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      int rows [WP];
      // stimulus
      shift = $urandom_range(0, 1)[0];
      for (int k = 0; k < B; k++) new_block[k] = W'($urandom);
      wr_wl = '0;
      for (int p = 0; p < WP; p++) begin
        bit dup;
        rows[p] = -1;
        if ($urandom_range(0, 2) != 0) begin
          int r;
          r = $urandom_range(0, N - 1);
          dup = 1'b0;
          for (int q = 0; q < p; q++) if (rows[q] == r) dup = 1'b1;
          if (!dup) begin rows[p] = r; wr_wl[p][r] = 1'b1; end
        end
        wr_data[p] = W'($urandom);
      end
      rd_wl = '0;
      for (int p = 0; p < RP; p++) begin
        if ($urandom_range(0, 7) != 0) rd_wl[p][$urandom_range(0, N - 1)] = 1'b1;
        else if (rows[0] >= 0) rd_wl[p][rows[0]] = 1'b1;
      end
      // reference: writes, then reads
      for (int i = 0; i < N; i++) upd[i] = model[i];
      for (int p = 0; p < WP; p++) if (rows[p] >= 0) upd[rows[p]] = wr_data[p];
      #1;
      for (int p = 0; p < RP; p++) begin
        logic [W-1:0] e;
        e = '0;
        for (int i = 0; i < N; i++) if (rd_wl[p][i]) begin
          e = upd[i];
          for (int q = 0; q < WP; q++) if (rows[q] == i) same_cycle_reads++;
        end
        checks++;
        if (rd_data[p] !== e) begin
          failures++;
          $display("t=%0d read port %0d got %h exp %h", t, p, rd_data[p], e);
        end
      end
      for (int k = 0; k < B; k++) begin
        checks++;
        if (out_block[k] !== upd[N-B+k]) begin
          failures++;
          $display("t=%0d out_block[%0d] got %h exp %h", t, k, out_block[k], upd[N-B+k]);
        end
      end
      // edge: shift or hold
      if (shift) begin
        shifts++;
        for (int i = N - 1; i >= B; i--) model[i] = upd[i-B];
        for (int k = 0; k < B; k++) model[k] = new_block[k];
      end else begin
        for (int i = 0; i < N; i++) model[i] = upd[i];
      end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dut.q[i] !== model[i]) begin
          failures++;
          $display("t=%0d row %0d holds %h exp %h", t, i, dut.q[i], model[i]);
        end
      end
    end
    if (shifts == 0 || same_cycle_reads == 0) begin
      failures++;
      $display("coverage: shifts=%0d same_cycle_reads=%0d", shifts, same_cycle_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
