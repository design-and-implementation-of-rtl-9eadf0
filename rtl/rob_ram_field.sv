// rob_ram_field: a column group of multi-port RAM cells of the reorder
// buffer, one word per entry, that shifts down by one block per cycle.
//
// The buffer uses it twice: 32 bits wide for the DATA field (it first
// holds the instruction's tag and later its result) and 1 bit wide for the
// READY field. Each row has WR_PORTS write word lines and RD_PORTS read
// word lines, as the eight-port data cell does (four results written,
// eight operands read per cycle).
//
// Order inside one cycle follows the phase table of the original design:
// results are written first, then operands are read (so a read sees a
// result written in the same cycle), then the field shifts (so a result
// written into a row is carried along with it). On the clock edge every
// row either keeps its updated word (shift low) or takes the updated word
// of the row BLOCK places above; the top BLOCK rows take `new_block`.
// `out_block` is the updated bottom block, the part that leaves the buffer
// when it shifts. Read word lines are expected to be one-hot or zero per
// port (the lookup arrays ensure that); a port with no word line set reads
// zero, where the original circuit would leave its precharged bit line.
// Two write ports naming the same row is an error; the higher port wins.
module rob_ram_field #(
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned BLOCK    = 4,
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned WR_PORTS = 4,
  parameter int unsigned RD_PORTS = 8
) (
  input  logic                          clk,
  input  logic                          shift,
  input  logic [BLOCK-1:0][WIDTH-1:0]   new_block,  // [k] enters row k
  input  logic [WR_PORTS-1:0][ENTRIES-1:0] wr_wl,
  input  logic [WR_PORTS-1:0][WIDTH-1:0]   wr_data,
  input  logic [RD_PORTS-1:0][ENTRIES-1:0] rd_wl,
  output logic [RD_PORTS-1:0][WIDTH-1:0]   rd_data,
  output logic [BLOCK-1:0][WIDTH-1:0]   out_block   // [k] is row ENTRIES-BLOCK+k
);

  logic [ENTRIES-1:0][WIDTH-1:0] q;      // stored words
  logic [ENTRIES-1:0][WIDTH-1:0] upd;    // words after this cycle's writes
  logic [ENTRIES-1:0]            wr_any;

  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      upd[i]    = q[i];
      wr_any[i] = 1'b0;
      for (int unsigned p = 0; p < WR_PORTS; p++) begin
        if (wr_wl[p][i]) begin
          upd[i]    = wr_data[p];
          wr_any[i] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < RD_PORTS; r++) begin
      rd_data[r] = '0;
      for (int unsigned i = 0; i < ENTRIES; i++)
        if (rd_wl[r][i]) rd_data[r] = rd_data[r] | upd[i];
    end
  end

  for (genvar k = 0; k < BLOCK; k++) begin : g_out
    assign out_block[k] = upd[ENTRIES-BLOCK+k];
  end

  for (genvar i = 0; i < ENTRIES; i++) begin : g_row
    logic [WIDTH-1:0] from_above;
    if (i < BLOCK) begin : g_top
      assign from_above = new_block[i];
    end else begin : g_mid
      assign from_above = upd[i-BLOCK];
    end
    rob_shift_cell #(.WIDTH(WIDTH)) u_cell (
      .clk      (clk),
      .rst      (1'b0),
      .shift    (shift),
      .shift_in (from_above),
      .upd      (wr_any[i]),
      .upd_val  (upd[i]),
      .q        (q[i])
    );
  end

  // At most one write port may select a row in a cycle.
  for (genvar i = 0; i < ENTRIES; i++) begin : g_chk
    logic [WR_PORTS-1:0] sel;
    for (genvar p = 0; p < WR_PORTS; p++) begin : g_sel
      assign sel[p] = wr_wl[p][i];
    end
    a_one_writer: assert property (@(posedge clk) $onehot0(sel))
      else $error("rob_ram_field: row %0d written by several ports", i);
  end

endmodule
