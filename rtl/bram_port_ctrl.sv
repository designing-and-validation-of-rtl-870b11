// bram_port_ctrl: control decoder of one block RAM port.
//
// Each port of the block RAM has three control lines sampled on the rising
// clock edge: chip select (cs), write (wr) and read (rd). A write happens when
// cs and wr are high and a read when cs and rd are high with wr low. When wr
// goes high the read path of that port is disabled, so wr takes priority over
// rd on the same port; a read and a write in the same cycle are done through
// the two ports of the memory. With cs low the port does nothing, whatever wr
// and rd say.
//
// The CS/WR/RD conditions follow the description of the design; giving wr
// priority when both wr and rd are high on one port is the reading taken here
// of its statement that the read port is disabled once the write signal is
// high.
//
// Interface: cs, wr, rd in; we (write enable), re (read enable) and op (the
// decoded operation) out. Purely combinational: the memory array registers
// the result on the next clock edge.
module bram_port_ctrl
  import bram_pkg::*;
(
  input  logic     cs,
  input  logic     wr,
  input  logic     rd,
  output logic     we,
  output logic     re,
  output port_op_e op
);

  always_comb begin
    we = cs & wr;
    re = cs & rd & ~wr;
    if (we)      op = OP_WRITE;
    else if (re) op = OP_READ;
    else         op = OP_IDLE;
  end

  // One port never reads and writes in the same cycle.
  always_comb assert (!(we && re)) else $error("bram_port_ctrl: write and read enabled together");

endmodule
