// rob_valid_field: the valid bit of every entry of the reorder buffer.
//
// Each bit is a resettable shift/storage cell that moves down one block
// per cycle with the rest of the entry; the top block takes `new_valid`
// (which slots of the arriving group hold an instruction). A synchronous
// active-high `rst` empties the buffer. When an instruction turns out to
// be a mispredicted branch or raises an exception its row is flagged in
// `squash_row`, and every row above it - every younger instruction - is
// cleared on the same clock edge, whether or not the buffer shifts. The
// flagged row itself stays valid. Several flags in one cycle clear
// everything above the lowest (oldest) of them. Which rows to clear is
// computed here with a prefix OR from the bottom; the original only says
// that following entries are invalidated through the valid cell.
//
// `valid` is the stored bit; callers use it to qualify destination
// matches and result writes. `valid_kept` already leaves out the rows
// cleared this cycle, for rows that leave the buffer on this edge.
module rob_valid_field #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned BLOCK   = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               shift,
  input  logic [BLOCK-1:0]   new_valid,   // [k] enters row k
  input  logic [ENTRIES-1:0] squash_row,
  output logic [ENTRIES-1:0] valid,
  output logic [ENTRIES-1:0] valid_kept   // valid minus this cycle's invalidation
);

  logic [ENTRIES-1:0] kill;   // row lies above a flagged row

  always_comb begin
    kill[ENTRIES-1] = 1'b0;
    for (int i = ENTRIES - 2; i >= 0; i--)
      kill[i] = kill[i+1] | squash_row[i+1];
  end

  assign valid_kept = valid & ~kill;

  for (genvar i = 0; i < ENTRIES; i++) begin : g_row
    logic from_above;
    if (i < BLOCK) begin : g_top
      assign from_above = new_valid[i];
    end else begin : g_mid
      assign from_above = valid_kept[i-BLOCK];
    end
    rob_shift_cell #(.WIDTH(1), .RESETTABLE(1'b1)) u_cell (
      .clk      (clk),
      .rst      (rst),
      .shift    (shift),
      .shift_in (from_above),
      .upd      (kill[i]),
      .upd_val  (1'b0),
      .q        (valid[i])
    );
  end

endmodule
