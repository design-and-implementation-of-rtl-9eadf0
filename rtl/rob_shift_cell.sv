// rob_shift_cell: the shift/storage element that every field of the
// reorder buffer is built from.
//
// One register stores the entry's value and also acts as a stage of the
// shift path: when `shift` is high it loads `shift_in`, the value of the
// entry one block (four rows) above; otherwise it keeps its value for as
// long as the buffer stalls. Storing and shifting in the same element
// follows the original cell. The original is a two-phase transmission-gate
// latch pair; here it is one rising-edge flip-flop. The `upd`/`upd_val`
// pair lets a field change the stored value in place when it does not
// shift (a result written into the entry); shift has priority because a
// field hands the already-updated value of the row above on `shift_in`.
// With RESETTABLE set, a synchronous active-high `rst` clears the cell
// (the valid bit uses this); otherwise `rst` is ignored.
module rob_shift_cell #(
  parameter int unsigned WIDTH      = 1,
  parameter bit          RESETTABLE = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic [WIDTH-1:0] shift_in,
  input  logic             upd,
  input  logic [WIDTH-1:0] upd_val,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (RESETTABLE && rst) q <= '0;
    else if (shift)        q <= shift_in;
    else if (upd)          q <= upd_val;
  end

endmodule
