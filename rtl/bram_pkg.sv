// bram_pkg: constants and types shared by the block RAM modules.
//
// The default geometry is a four-bit wide memory with an eight-bit address
// (256 locations), the size of the block RAM this design describes. The port
// operation type names what one port does in a clock cycle once its CS, WR and
// RD controls have been decoded; only the decoder and the testbenches use it,
// the memory array itself sees plain enables.
package bram_pkg;

  // Default data width of each location, in bits.
  localparam int unsigned DATA_W_DEF = 4;
  // Default address width; the memory holds 2**ADDR_W_DEF locations.
  localparam int unsigned ADDR_W_DEF = 8;

  // What a port does in one cycle.
  typedef enum logic [1:0] {
    OP_IDLE  = 2'd0,  // chip select low, or neither WR nor RD
    OP_WRITE = 2'd1,  // CS and WR high: store data in at the address
    OP_READ  = 2'd2   // CS and RD high, WR low: register the word at the address
  } port_op_e;

endpackage
