// rob_cam_field: a column group of content-addressable cells of the
// reorder buffer, one identifier per entry, shifting down one block per
// cycle.
//
// The buffer uses it for the destination register field (two identical
// pieces, one comparing the four first source operands and one the four
// second source operands, as in the original floor plan) and for the tag
// field (comparing the four result tags). Each of the PORTS keys is
// compared against every stored word at once; `match[p][i]` is high when
// key p equals the word of row i. Matching is purely combinational on the
// stored words: the original evaluates a discharged match line with a weak
// pull-up, which has the same logic function. Whether a row is valid is
// not known here; the caller qualifies the matches.
//
// On a clock edge with `shift` high each row takes the word of the row
// BLOCK places above and the top BLOCK rows take `new_block`; with `shift`
// low the field holds.
module rob_cam_field #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned BLOCK   = 4,
  parameter int unsigned WIDTH   = 5,
  parameter int unsigned PORTS   = 4
) (
  input  logic                          clk,
  input  logic                          shift,
  input  logic [BLOCK-1:0][WIDTH-1:0]   new_block,  // [k] enters row k
  input  logic [PORTS-1:0][WIDTH-1:0]   key,
  output logic [PORTS-1:0][ENTRIES-1:0] match,
  output logic [ENTRIES-1:0][WIDTH-1:0] word        // stored words
);

  for (genvar i = 0; i < ENTRIES; i++) begin : g_row
    logic [WIDTH-1:0] from_above;
    if (i < BLOCK) begin : g_top
      assign from_above = new_block[i];
    end else begin : g_mid
      assign from_above = word[i-BLOCK];
    end
    rob_shift_cell #(.WIDTH(WIDTH)) u_cell (
      .clk      (clk),
      .rst      (1'b0),
      .shift    (shift),
      .shift_in (from_above),
      .upd      (1'b0),
      .upd_val  ('0),
      .q        (word[i])
    );
    for (genvar p = 0; p < PORTS; p++) begin : g_port
      assign match[p][i] = (word[i] == key[p]);
    end
  end

endmodule
