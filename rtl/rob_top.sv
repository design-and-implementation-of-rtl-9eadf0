// rob_top: a 32-entry reorder buffer for a four-way superscalar processor.
//
// The buffer is a shifting FIFO of eight blocks of four entries. Each
// cycle it shifts, the decoder's group of up to four instructions enters
// the top block: each destination register is renamed to a fresh tag
// (returned on `alloc_tag_o`), the tag is parked in the entry's data word
// and the ready bit is cleared. At the same time the bottom block leaves
// the buffer and its valid entries are committed, in program order, to the
// register file on `commit_o`. Within a block, slot 0 (the oldest
// instruction of the group) sits lowest, so the row closest to the top is
// always the youngest.
//
// Per cycle, in the order of the original four-phase timing:
//  1. Result tags are compared against the tag field. A result writes its
//     data into the matching valid entry and sets the ready bit.
//  2. The eight source registers (src_i[0..3] first operands of slots 0..3,
//     src_i[4..7] second operands) are compared against the destination
//     field, split into two four-port pieces. Invalid rows never match. A
//     lookup array per operand keeps the match closest to the top.
//  3. The selected entry is read: `hit` says a valid entry renames the
//     register, `ready` whether `value` is the result or, in its low bits,
//     the producer's tag. A result written this cycle is already visible.
//     Without a hit the operand comes from the register file.
//  4. The buffer shifts by one block unless `stall_i` is high or a valid
//     entry of the bottom block is still waiting for its result (results
//     arriving this cycle count); then nothing enters or leaves.
// A result with `squash` set (mispredicted branch or exception) clears the
// valid bit of every younger entry and discards the group offered in that
// cycle; the flagged instruction itself stays and commits normally.
//
// Lookups use the contents at the start of the cycle, so a source is never
// matched against a destination of its own group; dependences inside a
// group are left to the decoder. That choice, the stall rule, the squash
// interface and the tag scheme are this implementation's; the field
// structure, the block shift, the sizes and the in-cycle order follow the
// original design. All state changes on the rising edge of `clk`; `rst` is
// synchronous and active high and empties the buffer.
module rob_top
  import rob_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  stall_i,
  // decoder: one group per cycle
  input  alloc_t   [BLOCK-1:0]  alloc_i,
  output logic                  alloc_ready_o,   // group is taken on this edge
  output tag_t     [BLOCK-1:0]  alloc_tag_o,
  // operand lookup
  input  reg_id_t  [N_SRC-1:0]  src_i,
  output operand_t [N_SRC-1:0]  operand_o,
  // result buses
  input  result_t  [N_RES-1:0]  result_i,
  // retirement to the register file
  output commit_t  [BLOCK-1:0]  commit_o
);

  logic                           shift;
  logic [ENTRIES-1:0]             valid, valid_kept;
  logic [N_RES-1:0][ENTRIES-1:0]  tag_match, match_tag;
  logic [N_SRC-1:0][ENTRIES-1:0]  dest_match, match_dest, current;
  logic [ENTRIES-1:0][TAG_W-1:0]  tag_word;
  logic [ENTRIES-1:0][REG_W-1:0]  dest_word_a, dest_word_b;
  logic [ENTRIES-1:0]             squash_row;
  logic                           any_squash;
  tag_t    [BLOCK-1:0]            new_tag;
  logic    [BLOCK-1:0]            new_valid;
  reg_id_t [BLOCK-1:0]            new_dest;
  data_t   [BLOCK-1:0]            new_data;
  logic    [N_RES-1:0][DATA_W-1:0] wr_data;
  logic    [N_SRC-1:0][DATA_W-1:0] rd_data;
  logic    [N_SRC-1:0][0:0]       rd_ready;
  logic    [BLOCK-1:0][DATA_W-1:0] out_data;
  logic    [BLOCK-1:0][0:0]       out_ready;
  logic                           bottom_pending;

  // ---- tag generator and the arriving block (slot s enters row BLOCK-1-s)
  rob_tag_gen #(.BLOCKS(BLOCKS), .BLOCK(BLOCK), .TAG_W(TAG_W)) u_tag_gen (
    .clk, .rst, .shift, .tag (alloc_tag_o)
  );

  always_comb begin
    for (int unsigned k = 0; k < BLOCK; k++) begin
      new_valid[k] = alloc_i[BLOCK-1-k].valid & ~any_squash;
      new_dest[k]  = alloc_i[BLOCK-1-k].dest;
      new_tag[k]   = alloc_tag_o[BLOCK-1-k];
      new_data[k]  = DATA_W'(alloc_tag_o[BLOCK-1-k]);
    end
  end

  // ---- tag field: result tag comparison and write word lines
  rob_cam_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK), .WIDTH(TAG_W), .PORTS(N_RES)) u_tag_field (
    .clk, .shift, .new_block (new_tag),
    .key   ({result_i[3].tag, result_i[2].tag, result_i[1].tag, result_i[0].tag}),
    .match (tag_match),
    .word  (tag_word)
  );

  always_comb begin
    squash_row = '0;
    any_squash = 1'b0;
    for (int unsigned p = 0; p < N_RES; p++) begin
      match_tag[p] = tag_match[p] & valid & {ENTRIES{result_i[p].valid}};
      wr_data[p]   = result_i[p].data;
      if (result_i[p].squash) squash_row = squash_row | match_tag[p];
    end
    any_squash = |squash_row;
  end

  // ---- destination field, two identical pieces of four ports each
  rob_cam_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK), .WIDTH(REG_W), .PORTS(BLOCK)) u_dest_a (
    .clk, .shift, .new_block (new_dest),
    .key   (src_i[BLOCK-1:0]),
    .match (dest_match[BLOCK-1:0]),
    .word  (dest_word_a)
  );
  rob_cam_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK), .WIDTH(REG_W), .PORTS(BLOCK)) u_dest_b (
    .clk, .shift, .new_block (new_dest),
    .key   (src_i[N_SRC-1:BLOCK]),
    .match (dest_match[N_SRC-1:BLOCK]),
    .word  (dest_word_b)
  );

  // ---- valid field
  rob_valid_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK)) u_valid (
    .clk, .rst, .shift, .new_valid, .squash_row, .valid, .valid_kept
  );

  // ---- lookup arrays: the most current matching entry per operand
  for (genvar o = 0; o < N_SRC; o++) begin : g_lookup
    assign match_dest[o] = dest_match[o] & valid;
    rob_lookup #(.ENTRIES(ENTRIES)) u_lookup (
      .match_in  (match_dest[o]),
      .match_out (current[o])
    );
  end

  // ---- data and ready fields
  rob_ram_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK), .WIDTH(DATA_W),
                  .WR_PORTS(N_RES), .RD_PORTS(N_SRC)) u_data (
    .clk, .shift, .new_block (new_data),
    .wr_wl (match_tag), .wr_data (wr_data),
    .rd_wl (current),   .rd_data (rd_data),
    .out_block (out_data)
  );
  rob_ram_field #(.ENTRIES(ENTRIES), .BLOCK(BLOCK), .WIDTH(1),
                  .WR_PORTS(N_RES), .RD_PORTS(N_SRC)) u_ready (
    .clk, .shift, .new_block ('0),
    .wr_wl (match_tag), .wr_data ({N_RES{1'b1}}),
    .rd_wl (current),   .rd_data (rd_ready),
    .out_block (out_ready)
  );

  always_comb begin
    for (int unsigned o = 0; o < N_SRC; o++) begin
      operand_o[o].hit   = |current[o];
      operand_o[o].ready = rd_ready[o][0];
      operand_o[o].value = rd_data[o];
    end
  end

  // ---- shift control and commit of the bottom block
  always_comb begin
    bottom_pending = 1'b0;
    for (int unsigned k = 0; k < BLOCK; k++)
      if (valid_kept[ENTRIES-BLOCK+k] && !out_ready[k][0]) bottom_pending = 1'b1;
  end

  assign shift         = ~stall_i & ~bottom_pending;
  assign alloc_ready_o = shift;

  always_comb begin
    for (int unsigned s = 0; s < BLOCK; s++) begin
      commit_o[s].valid = shift & valid_kept[ENTRIES-1-s];
      commit_o[s].dest  = dest_word_a[ENTRIES-1-s];
      commit_o[s].data  = out_data[BLOCK-1-s];
    end
  end

  // No two valid entries may carry the same tag, or a result would be
  // written twice.
  logic dup_tag;
  always_comb begin
    dup_tag = 1'b0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      for (int unsigned k = i + 1; k < ENTRIES; k++)
        if (valid[i] && valid[k] && tag_word[i] == tag_word[k]) dup_tag = 1'b1;
  end
  a_unique_tags: assert property (@(posedge clk) disable iff (rst) !dup_tag)
    else $error("rob_top: two valid entries share a tag");

  // The two destination pieces always hold the same identifiers.
  a_dest_copies: assert property (@(posedge clk) disable iff (rst) dest_word_a == dest_word_b)
    else $error("rob_top: destination pieces disagree");

endmodule
