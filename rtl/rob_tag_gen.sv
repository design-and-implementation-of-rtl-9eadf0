// rob_tag_gen: the tag generator that feeds the tag field of the reorder
// buffer.
//
// Each cycle the buffer shifts, a new block of BLOCK entries enters the
// top and needs tags that no entry still inside the buffer uses. A block
// stays in the buffer for at most BLOCKS shifts, so a block counter modulo
// BLOCKS, with the slot number appended as the low bits, gives every
// resident entry a distinct tag: tag = {block_count, slot}. The counter
// advances on every shift, also when the block is empty. The original
// design names the generator but not its scheme; this one is the simplest
// that keeps tags unique. Reset (synchronous, active high) starts at 0.
//
// `tag[k]` is combinational from the counter and is valid in the cycle the
// block is offered; the counter steps on the edge that shifts it in.
module rob_tag_gen #(
  parameter int unsigned BLOCKS = 8,
  parameter int unsigned BLOCK  = 4,
  parameter int unsigned TAG_W  = 5
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        shift,
  output logic [BLOCK-1:0][TAG_W-1:0] tag
);

  localparam int unsigned CNT_W  = $clog2(BLOCKS);
  localparam int unsigned SLOT_W = $clog2(BLOCK);

  if (CNT_W + SLOT_W != TAG_W) begin : g_bad_size
    $error("rob_tag_gen: TAG_W must equal lg(BLOCKS) + lg(BLOCK)");
  end

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (shift) count <= count + 1'b1;
  end

  for (genvar k = 0; k < BLOCK; k++) begin : g_tag
    assign tag[k] = {count, SLOT_W'(k)};
  end

endmodule
