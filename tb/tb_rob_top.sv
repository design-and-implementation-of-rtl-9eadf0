// tb_rob_top: end-to-end test of the reorder buffer at its full size
// (32 entries, four-wide), with an independent model.
//
// The model keeps the buffer as eight groups of four instruction slots,
// newest group first, and finds a source's producer by walking from the
// newest instruction to the oldest; it never looks at the rows of the
// design. A random decoder offers groups of up to four instructions,
// random functional units return results for random instructions still in
// flight (so the bottom block is often incomplete and the buffer stalls),
// the outside world stalls now and then, and a few results carry `squash`.
// Each cycle the test checks the tags handed out, the acceptance of the
// group, all eight operands (hit, ready, value or tag) and the committed
// block; it also rebuilds the register file from the commits.
//
// A second phase runs with no stalls and every result returned the cycle
// after allocation: the buffer must take a group of four every cycle,
// retire four instructions per cycle, and retire each group exactly eight
// cycles after it entered (one shift per block of the 32 entries).
//
// Every mechanism is counted and a failure is counted for any that never
// happened: bottom-block stall, external stall, same-cycle result
// forwarding, a result written into the block leaving that cycle, reads of
// a tag and of a value, misses, a lookup choosing among several matches,
// squashes, and a squash that discards the offered group.
module tb_rob_top;
  import rob_pkg::*;

  localparam int unsigned RANDOM_CYCLES = 20000;
  localparam int unsigned RATE_CYCLES   = 200;

  logic clk = 1'b0, rst, stall_i, alloc_ready_o;
  alloc_t   [BLOCK-1:0] alloc_i;
  tag_t     [BLOCK-1:0] alloc_tag_o;
  reg_id_t  [N_SRC-1:0] src_i;
  operand_t [N_SRC-1:0] operand_o;
  result_t  [N_RES-1:0] result_i;
  commit_t  [BLOCK-1:0] commit_o;

  rob_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    bit         valid;
    bit [4:0]   dest;
    bit [4:0]   tag;
    bit         ready;
    bit [31:0]  data;
    int         born;     // cycle of allocation
  } ment_t;

  ment_t g [BLOCKS][BLOCK];   // g[0] newest group, slot BLOCK-1 youngest
  ment_t u [BLOCKS][BLOCK];   // after this cycle's writes
  bit    kill [BLOCKS][BLOCK];
  bit [31:0] rf [32];
  int unsigned cnt;
  int cycle;
  int checks = 0, failures = 0;
  int n_stall_bottom = 0, n_stall_ext = 0, n_forward = 0, n_commit_write = 0;
  int n_read_tag = 0, n_read_value = 0, n_miss = 0, n_multi = 0;
  int n_squash = 0, n_squash_drop = 0, n_commits = 0;
  int rate_commits = 0, rate_accepts = 0, lat_bad = 0;
  bit rate_phase = 1'b0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    repeat (RANDOM_CYCLES + RATE_CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pick stimulus for this cycle from the model state
  task automatic drive();
    int pb [$], ps [$];
    stall_i = rate_phase ? 1'b0 : ($urandom_range(0, 9) == 0);
    for (int s = 0; s < BLOCK; s++) begin
      alloc_i[s].valid = rate_phase ? 1'b1 : ($urandom_range(0, 4) != 0);
      alloc_i[s].dest  = rate_phase ? 5'(s + 8) : 5'($urandom_range(0, 11));
    end
    for (int o = 0; o < N_SRC; o++) src_i[o] = 5'($urandom_range(0, 13));
    // candidates for results: valid, not ready
    for (int b = 0; b < BLOCKS; b++)
      for (int s = 0; s < BLOCK; s++)
        if (g[b][s].valid && !g[b][s].ready) begin pb.push_back(b); ps.push_back(s); end
    for (int p = 0; p < N_RES; p++) begin
      result_i[p] = '0;
      if (rate_phase) begin
        // results for the group that entered last cycle, one per bus
        if (g[0][p].valid && !g[0][p].ready) begin
          result_i[p].valid = 1'b1;
          result_i[p].tag   = g[0][p].tag;
          result_i[p].data  = $urandom;
        end
      end else if (pb.size() > 0 && $urandom_range(0, 2) != 0) begin
        int k;
        k = $urandom_range(0, pb.size() - 1);
        result_i[p].valid  = 1'b1;
        result_i[p].tag    = g[pb[k]][ps[k]].tag;
        result_i[p].data   = $urandom;
        result_i[p].squash = ($urandom_range(0, 199) == 0);
        pb.delete(k); ps.delete(k);
      end
    end
  endtask

  // compare the design with the model for this cycle and advance the model
  task automatic check_and_step();
    bit any_squash, shift, pending;
    int hits;
    // writes
    for (int b = 0; b < BLOCKS; b++)
      for (int s = 0; s < BLOCK; s++) begin
        u[b][s] = g[b][s];
        kill[b][s] = 1'b0;
      end
    any_squash = 1'b0;
    for (int p = 0; p < N_RES; p++)
      if (result_i[p].valid)
        for (int b = 0; b < BLOCKS; b++)
          for (int s = 0; s < BLOCK; s++)
            if (g[b][s].valid && g[b][s].tag == result_i[p].tag) begin
              u[b][s].ready = 1'b1;
              u[b][s].data  = result_i[p].data;
              if (b == BLOCKS - 1) n_commit_write++;
              if (result_i[p].squash) begin
                any_squash = 1'b1;
                for (int bb = 0; bb < BLOCKS; bb++)
                  for (int ss = 0; ss < BLOCK; ss++)
                    if (bb < b || (bb == b && ss > s)) kill[bb][ss] = 1'b1;
              end
            end
    // tags offered
    for (int s = 0; s < BLOCK; s++) begin
      checks++;
      if (alloc_tag_o[s] !== 5'((cnt % BLOCKS) * BLOCK + s))
        fail($sformatf("alloc tag slot %0d = %0d", s, alloc_tag_o[s]));
    end
    // operands: newest first
    for (int o = 0; o < N_SRC; o++) begin
      bit found;
      ment_t e;
      found = 1'b0;
      hits = 0;
      for (int b = 0; b < BLOCKS; b++)
        for (int s = BLOCK - 1; s >= 0; s--)
          if (u[b][s].valid && u[b][s].dest == src_i[o]) begin
            hits++;
            if (!found) begin found = 1'b1; e = u[b][s]; end
          end
      if (hits > 1) n_multi++;
      checks++;
      if (!found) begin
        n_miss++;
        if (operand_o[o].hit !== 1'b0) fail($sformatf("operand %0d: unexpected hit", o));
      end else begin
        if (e.ready && !g_ready_of(e.tag)) n_forward++;
        if (e.ready) n_read_value++; else n_read_tag++;
        if (operand_o[o].hit !== 1'b1 || operand_o[o].ready !== e.ready ||
            operand_o[o].value !== (e.ready ? e.data : 32'(e.tag)))
          fail($sformatf("operand %0d reg %0d: got hit=%b ready=%b value=%h, exp ready=%b value=%h",
                         o, src_i[o], operand_o[o].hit, operand_o[o].ready, operand_o[o].value,
                         e.ready, e.ready ? e.data : 32'(e.tag)));
      end
    end
    // shift decision
    pending = 1'b0;
    for (int s = 0; s < BLOCK; s++)
      if (u[BLOCKS-1][s].valid && !kill[BLOCKS-1][s] && !u[BLOCKS-1][s].ready) pending = 1'b1;
    shift = !stall_i && !pending;
    if (stall_i) n_stall_ext++;
    else if (pending) n_stall_bottom++;
    checks++;
    if (alloc_ready_o !== shift) fail($sformatf("alloc_ready %b exp %b", alloc_ready_o, shift));
    if (rate_phase && shift) rate_accepts++;
    // commits, slot 0 oldest
    for (int s = 0; s < BLOCK; s++) begin
      bit ev;
      ev = shift && u[BLOCKS-1][s].valid && !kill[BLOCKS-1][s];
      checks++;
      if (commit_o[s].valid !== ev)
        fail($sformatf("commit slot %0d valid %b exp %b", s, commit_o[s].valid, ev));
      else if (ev) begin
        n_commits++;
        if (rate_phase) rate_commits++;
        if (rate_phase && cycle - u[BLOCKS-1][s].born != int'(BLOCKS)) lat_bad++;
        if (commit_o[s].dest !== u[BLOCKS-1][s].dest || commit_o[s].data !== u[BLOCKS-1][s].data)
          fail($sformatf("commit slot %0d r%0d=%h exp r%0d=%h", s, commit_o[s].dest,
                         commit_o[s].data, u[BLOCKS-1][s].dest, u[BLOCKS-1][s].data));
        rf[u[BLOCKS-1][s].dest] = u[BLOCKS-1][s].data;
      end
    end
    if (any_squash) begin
      n_squash++;
      if (shift) for (int s = 0; s < BLOCK; s++) if (alloc_i[s].valid) begin n_squash_drop++; break; end
    end
    // advance the model
    for (int b = 0; b < BLOCKS; b++)
      for (int s = 0; s < BLOCK; s++)
        if (kill[b][s]) u[b][s].valid = 1'b0;
    if (shift) begin
      for (int b = BLOCKS - 1; b > 0; b--) g[b] = u[b-1];
      for (int s = 0; s < BLOCK; s++) begin
        g[0][s].valid = alloc_i[s].valid && !any_squash;
        g[0][s].dest  = alloc_i[s].dest;
        g[0][s].tag   = 5'((cnt % BLOCKS) * BLOCK + s);
        g[0][s].ready = 1'b0;
        g[0][s].data  = 32'(g[0][s].tag);
        g[0][s].born  = cycle;
      end
      cnt++;
    end else begin
      g = u;
    end
  endtask

  // ready state of an instruction before this cycle's writes
  function automatic bit g_ready_of(bit [4:0] tag);
    for (int b = 0; b < BLOCKS; b++)
      for (int s = 0; s < BLOCK; s++)
        if (g[b][s].valid && g[b][s].tag == tag) return g[b][s].ready;
    return 1'b0;
  endfunction

  initial begin
    rst = 1'b1; stall_i = 1'b0; alloc_i = '0; src_i = '0; result_i = '0;
    for (int b = 0; b < BLOCKS; b++)
      for (int s = 0; s < BLOCK; s++) g[b][s] = '{default: 0};
    cnt = 0;
    cycle = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (cycle = 1; cycle <= int'(RANDOM_CYCLES + RATE_CYCLES); cycle++) begin
      rate_phase = (cycle > int'(RANDOM_CYCLES) + 40);
      if (cycle > int'(RANDOM_CYCLES) && !rate_phase) begin
        // drain: no new work, finish all outstanding instructions
        drive();
        stall_i = 1'b0;
        alloc_i = '0;
        for (int p = 0; p < N_RES; p++) result_i[p].squash = 1'b0;
      end else begin
        drive();
      end
      #1;
      check_and_step();
      @(posedge clk); #1;
    end
    // rate: after the 40-cycle drain, a group enters every cycle and from
    // the ninth rate cycle on four instructions retire every cycle
    checks++;
    if (rate_accepts != int'(RATE_CYCLES) - 40) fail($sformatf("rate phase accepted %0d of %0d groups", rate_accepts, RATE_CYCLES - 40));
    checks++;
    if (rate_commits != int'(BLOCK) * (int'(RATE_CYCLES) - 40 - int'(BLOCKS)))
      fail($sformatf("rate phase retired %0d instructions, exp %0d", rate_commits,
                     BLOCK * (RATE_CYCLES - 40 - BLOCKS)));
    checks++;
    if (lat_bad != 0) fail($sformatf("%0d groups retired with latency other than %0d", lat_bad, BLOCKS));
    $display("mechanisms: stall_bottom=%0d stall_ext=%0d forward=%0d commit_write=%0d read_tag=%0d read_value=%0d miss=%0d multi_match=%0d squash=%0d squash_drop=%0d commits=%0d",
             n_stall_bottom, n_stall_ext, n_forward, n_commit_write, n_read_tag, n_read_value,
             n_miss, n_multi, n_squash, n_squash_drop, n_commits);
    if (n_stall_bottom == 0) fail("no bottom-block stall");
    if (n_stall_ext == 0) fail("no external stall");
    if (n_forward == 0) fail("no same-cycle forwarding");
    if (n_commit_write == 0) fail("no write into the leaving block");
    if (n_read_tag == 0) fail("no tag read");
    if (n_read_value == 0) fail("no value read");
    if (n_miss == 0) fail("no miss");
    if (n_multi == 0) fail("no multiple match");
    if (n_squash == 0) fail("no squash");
    if (n_squash_drop == 0) fail("no squash discarding a group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
