// gc_pkg: types and constants shared by the garbled-circuit evaluation
// coprocessor.
//
// A wire label is a 128-bit value; its least significant bit is the
// point-and-permute color bit. Wire IDs travel on the serial link as
// ID_BYTES bytes, most significant byte first. The six instructions and
// their opcode values are listed in opcode_e; the opcode values and the
// field widths are this design's choices, the instruction set itself
// (set address, read, write, AND, XOR, BUF) follows the architecture.
package gc_pkg;

  localparam int unsigned LABEL_W   = 128;       // wire label / ciphertext width
  localparam int unsigned LABEL_B   = LABEL_W/8; // bytes per label
  localparam int unsigned ID_BYTES  = 2;         // bytes per wire ID on the link
  localparam int unsigned ID_W      = 8*ID_BYTES;
  localparam int unsigned N_CT      = 3;         // ciphertexts per AND gate (row reduction)
  // READ: byte slots after the opcode before the first label byte. Three
  // give the label store time to answer with SCK at up to twice the core
  // clock.
  localparam int unsigned RD_GAP    = 3;

  typedef logic [LABEL_W-1:0] label_t;
  typedef logic [ID_W-1:0]    wire_id_t;

  typedef enum logic [7:0] {
    OP_NOP     = 8'h00,  // any byte not listed below is skipped as a NOP
    OP_SETADDR = 8'h01,  // ID           : set the read/write head
    OP_WRITE   = 8'h02,  // label        : store label at head, head++
    OP_READ    = 8'h03,  // RD_GAP+16 dummies: return label at head, head++
    OP_AND     = 8'h04,  // idA idB ct1 ct2 ct3 gid
    OP_XOR     = 8'h05,  // idA idB gid
    OP_BUF     = 8'h06   // idA gid
  } opcode_e;

  // Pointer row 0 is never sent (row reduction); rows 1..3 follow in order.
  typedef logic [1:0] row_t;

endpackage
