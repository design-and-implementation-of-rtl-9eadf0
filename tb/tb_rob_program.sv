// tb_rob_program: runs a generated DSP-style program through a small
// out-of-order core built around the reorder buffer, and checks that the
// buffer retires exactly the sequential program.
//
// Program: eight filter coefficients and a sliding window of eight input
// samples are loaded with immediates; then every iteration loads a new
// sample, multiplies four samples by four coefficients, sums the products
// in a tree, accumulates the output and folds it into a checksum. The
// temporaries are rewritten every iteration, so many instructions in
// flight write the same register and the buffer must pick the most recent
// one.
//
// Core around the buffer (all in this testbench):
//  - a decoder that offers up to four instructions per cycle in order and
//    ends a group before an instruction reading a register written earlier
//    in the same group (the buffer leaves such dependences to the decoder);
//  - an instruction window that takes each operand from the buffer (value
//    or tag) or, on a miss, from the register file, and catches tagged
//    operands from the result buses;
//  - four functional units with a random latency of 1 to 4 cycles, at most
//    four issues and four results per cycle;
//  - a register file written only from the buffer's commit port.
// Each retired instruction must be the next one of the program, in order,
// with the value a sequential execution gives. After the first 1,000
// cycles the run continues until the program has retired; the register
// file must then match the sequential result.
module tb_rob_program;
  import rob_pkg::*;

  localparam int ITER      = 400;
  localparam int MAX_CYCLE = 20000;

  typedef enum logic [1:0] {OP_LI, OP_ADD, OP_MUL, OP_XOR} op_e;
  typedef struct {
    op_e       op;
    bit [4:0]  dest, s1, s2;
    bit [31:0] imm;
  } instr_t;
  typedef struct {
    int        idx;
    bit [4:0]  tag;
    bit [31:0] v1, v2;
    bit [4:0]  t1, t2;
    bit        r1, r2;
  } win_t;
  typedef struct {
    int        due;
    bit [4:0]  tag;
    bit [31:0] data;
  } done_t;

  logic clk = 1'b0, rst, stall_i, alloc_ready_o;
  alloc_t   [BLOCK-1:0] alloc_i;
  tag_t     [BLOCK-1:0] alloc_tag_o;
  reg_id_t  [N_SRC-1:0] src_i;
  operand_t [N_SRC-1:0] operand_o;
  result_t  [N_RES-1:0] result_i;
  commit_t  [BLOCK-1:0] commit_o;

  rob_top dut (.*);

  always #5 clk = ~clk;

  instr_t    prog [$];
  bit [31:0] seq_val [$];     // value each instruction produces
  bit [31:0] ref_rf [32];
  bit [31:0] rf [32];
  win_t      win [$];
  done_t     fu [$];
  int        pc = 0, retired = 0, cycle = 0;
  int        retired_1000 = 0, stalled = 0, tag_waits = 0;
  int        checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cycle, msg);
  endtask

  function automatic bit [31:0] exec(op_e op, bit [31:0] a, bit [31:0] b, bit [31:0] imm);
    case (op)
      OP_LI:   return imm;
      OP_ADD:  return a + b;
      OP_MUL:  return a * b;
      default: return a ^ b;
    endcase
  endfunction

  function automatic bit uses_src(op_e op);
    return op != OP_LI;
  endfunction

  task automatic emit(op_e op, int d, int a, int b, bit [31:0] imm);
    instr_t i;
    i.op = op; i.dest = 5'(d); i.s1 = 5'(a); i.s2 = 5'(b); i.imm = imm;
    prog.push_back(i);
  endtask

  // r1..r8 coefficients, r9..r16 samples, r24..r30 temporaries,
  // r31 accumulated output, r20 checksum
  task automatic build_program();
    for (int k = 0; k < 8; k++) emit(OP_LI, 1 + k, 0, 0, $urandom_range(1, 99));
    for (int k = 0; k < 8; k++) emit(OP_LI, 9 + k, 0, 0, $urandom_range(0, 999));
    emit(OP_LI, 31, 0, 0, 0);
    emit(OP_LI, 20, 0, 0, 32'h1234_5678);
    for (int n = 0; n < ITER; n++) begin
      emit(OP_LI, 9 + (n % 8), 0, 0, $urandom_range(0, 999));
      for (int k = 0; k < 4; k++)
        emit(OP_MUL, 24 + k, 9 + ((n + k) % 8), 1 + ((n + k) % 8), 0);
      emit(OP_ADD, 28, 24, 25, 0);
      emit(OP_ADD, 29, 26, 27, 0);
      emit(OP_ADD, 30, 28, 29, 0);
      emit(OP_ADD, 31, 31, 30, 0);
      emit(OP_XOR, 20, 20, 31, 0);
    end
    foreach (ref_rf[r]) ref_rf[r] = '0;
    foreach (prog[i]) begin
      bit [31:0] v;
      v = exec(prog[i].op, ref_rf[prog[i].s1], ref_rf[prog[i].s2], prog[i].imm);
      seq_val.push_back(v);
      ref_rf[prog[i].dest] = v;
    end
  endtask

  int tag_idx [32];   // program index of the instruction holding each tag

  initial begin
    repeat (MAX_CYCLE + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gsize;
    build_program();
    foreach (rf[r]) rf[r] = '0;
    rst = 1'b1; stall_i = 1'b0; alloc_i = '0; src_i = '0; result_i = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (cycle = 1; cycle <= MAX_CYCLE && retired < prog.size(); cycle++) begin
      // results due this cycle, at most one per bus
      result_i = '0;
      begin
        int p;
        p = 0;
        for (int k = 0; k < fu.size() && p < int'(N_RES); k++)
          if (fu[k].due <= cycle) begin
            result_i[p].valid = 1'b1;
            result_i[p].tag   = fu[k].tag;
            result_i[p].data  = fu[k].data;
            p++;
            fu.delete(k);
            k--;
          end
      end
      // decoder: up to four in order, no dependence inside the group
      alloc_i = '0;
      src_i   = '0;
      gsize   = 0;
      while (gsize < int'(BLOCK) && pc + gsize < prog.size()) begin
        instr_t in;
        bit dep;
        in = prog[pc + gsize];
        dep = 1'b0;
        for (int q = 0; q < gsize; q++)
          if (uses_src(in.op) &&
              (prog[pc + q].dest == in.s1 || prog[pc + q].dest == in.s2)) dep = 1'b1;
        if (dep) break;
        alloc_i[gsize].valid = 1'b1;
        alloc_i[gsize].dest  = in.dest;
        src_i[gsize]         = in.s1;
        src_i[BLOCK + gsize] = in.s2;
        gsize++;
      end
      #1;
      // window catches this cycle's results
      for (int p = 0; p < int'(N_RES); p++)
        if (result_i[p].valid)
          foreach (win[w]) begin
            if (!win[w].r1 && win[w].t1 == result_i[p].tag) begin win[w].r1 = 1'b1; win[w].v1 = result_i[p].data; end
            if (!win[w].r2 && win[w].t2 == result_i[p].tag) begin win[w].r2 = 1'b1; win[w].v2 = result_i[p].data; end
          end
      // allocation: operands from the buffer or the register file
      if (alloc_ready_o) begin
        for (int s = 0; s < gsize; s++) begin
          win_t e;
          instr_t in;
          in = prog[pc + s];
          e.idx = pc + s;
          e.tag = alloc_tag_o[s];
          tag_idx[alloc_tag_o[s]] = pc + s;
          if (!uses_src(in.op)) begin
            e.r1 = 1'b1; e.r2 = 1'b1; e.v1 = '0; e.v2 = '0; e.t1 = '0; e.t2 = '0;
          end else begin
            e.t1 = operand_o[s].value[4:0];
            e.t2 = operand_o[BLOCK + s].value[4:0];
            e.r1 = !operand_o[s].hit || operand_o[s].ready;
            e.r2 = !operand_o[BLOCK + s].hit || operand_o[BLOCK + s].ready;
            e.v1 = operand_o[s].hit ? operand_o[s].value : rf[in.s1];
            e.v2 = operand_o[BLOCK + s].hit ? operand_o[BLOCK + s].value : rf[in.s2];
            tag_waits += int'(!e.r1) + int'(!e.r2);
          end
          win.push_back(e);
        end
        pc += gsize;
      end else if (gsize > 0) stalled++;
      // commit: strictly the next instructions of the program
      for (int s = 0; s < int'(BLOCK); s++)
        if (commit_o[s].valid) begin
          checks++;
          if (retired >= prog.size())
            fail("commit past the end of the program");
          else if (commit_o[s].dest !== prog[retired].dest || commit_o[s].data !== seq_val[retired])
            fail($sformatf("retired #%0d: r%0d=%h, expected r%0d=%h", retired, commit_o[s].dest,
                           commit_o[s].data, prog[retired].dest, seq_val[retired]));
          rf[commit_o[s].dest] = commit_o[s].data;
          retired++;
        end
      // issue up to four ready instructions, oldest first
      begin
        int issued;
        issued = 0;
        for (int w = 0; w < win.size() && issued < int'(N_RES); w++)
          if (win[w].r1 && win[w].r2) begin
            done_t d;
            d.due  = cycle + $urandom_range(1, 4);
            d.tag  = win[w].tag;
            d.data = exec(prog[win[w].idx].op, win[w].v1, win[w].v2, prog[win[w].idx].imm);
            fu.push_back(d);
            win.delete(w);
            w--;
            issued++;
          end
      end
      if (cycle == 1000) retired_1000 = retired;
      @(posedge clk); #1;
    end
    checks++;
    if (retired != prog.size()) fail($sformatf("retired %0d of %0d instructions", retired, prog.size()));
    foreach (rf[r]) begin
      checks++;
      if (rf[r] !== ref_rf[r]) fail($sformatf("r%0d = %h, expected %h", r, rf[r], ref_rf[r]));
    end
    checks++;
    if (retired_1000 == 0 || tag_waits == 0) fail("no progress or no operand waited for a tag");
    $display("program: %0d instructions in %0d cycles, %0d retired in the first 1000 cycles, %0d decoder stalls, %0d operands waited for a tag",
             prog.size(), cycle - 1, retired_1000, stalled, tag_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
