// rob_pkg: sizes and bundle types shared by the reorder buffer.
//
// The buffer holds 32 entries arranged as eight blocks of four. Every
// cycle one block of up to four instructions enters at the top and one
// block leaves at the bottom towards the register file. Entries are
// numbered from the top (entry 0 is the newest), as the lookup equations
// of the design count rows. Register identifiers and tags are 5 bits and
// the data path is 32 bits wide; all of these follow the original design.
// The `squash` flag on a result bus is this implementation's way of
// reporting a mispredicted branch or an exception.
package rob_pkg;

  localparam int unsigned ENTRIES  = 32;  // rows of the buffer
  localparam int unsigned BLOCK    = 4;   // entries per block = decode width
  localparam int unsigned BLOCKS   = ENTRIES / BLOCK;
  localparam int unsigned DATA_W   = 32;  // result width
  localparam int unsigned REG_W    = 5;   // register identifier width
  localparam int unsigned TAG_W    = 5;   // tag width, lg(ENTRIES)
  localparam int unsigned N_SRC    = 2 * BLOCK;  // eight source operands
  localparam int unsigned N_RES    = BLOCK;      // four result buses

  typedef logic [REG_W-1:0]  reg_id_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [DATA_W-1:0] data_t;

  // One instruction of the decoded group offered to the buffer.
  typedef struct packed {
    logic    valid;  // slot holds an instruction with a destination
    reg_id_t dest;   // architectural destination register
  } alloc_t;

  // A result bus from a functional unit.
  typedef struct packed {
    logic  valid;
    tag_t  tag;     // tag of the producing instruction
    data_t data;
    logic  squash;  // instruction was a mispredicted branch or raised an
                    // exception: invalidate every younger entry
  } result_t;

  // What the buffer returns for one source operand.
  typedef struct packed {
    logic  hit;    // a valid entry renames this register
    logic  ready;  // value holds the result; otherwise its low bits hold the tag
    data_t value;
  } operand_t;

  // One instruction retiring to the register file.
  typedef struct packed {
    logic    valid;
    reg_id_t dest;
    data_t   data;
  } commit_t;

endpackage
