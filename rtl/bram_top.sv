// bram_top: true dual-port block RAM, four bits wide with 256 locations by
// default.
//
// Two completely independent ports, A and B, share one clock and one memory.
// Each port has its own chip select, write and read controls, address, data in
// and data out. On a rising edge a port writes when CS and WR are high, reads
// when CS and RD are high with WR low, and does nothing otherwise; WR has
// priority over RD on the same port. Read data appears on the port's data out
// one clock after the edge that sampled the address and stays there until the
// port's next read. Used on its own, port A is the single-port memory (read or
// write in a cycle); with both ports in use a read and a write, or two reads
// or two writes, run in the same cycle.
//
// The geometry, the CS/WR/RD controls and the two independent ports follow the
// description of the design. The synchronous active-low reset of the output
// registers, the power-up contents (all zero), read-before-write between ports
// and port A winning a same-address write clash are this design's choices;
// bram_array documents them.
//
// Besides the data ports, a_op and b_op report combinationally what each port
// does at the coming clock edge (idle, write or read), for monitoring.
//
// Submodules: one bram_port_ctrl per port decodes the controls, bram_array
// holds the data.
module bram_top
  import bram_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned ADDR_W = ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A
  input  logic              a_cs,
  input  logic              a_wr,
  input  logic              a_rd,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_din,
  output logic [DATA_W-1:0] a_dout,
  // port B
  input  logic              b_cs,
  input  logic              b_wr,
  input  logic              b_rd,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_din,
  output logic [DATA_W-1:0] b_dout,
  // decoded operation of each port in the current cycle (status)
  output port_op_e          a_op,
  output port_op_e          b_op
);

  logic a_we, a_re, b_we, b_re;

  bram_port_ctrl u_ctrl_a (.cs(a_cs), .wr(a_wr), .rd(a_rd), .we(a_we), .re(a_re), .op(a_op));
  bram_port_ctrl u_ctrl_b (.cs(b_cs), .wr(b_wr), .rd(b_rd), .we(b_we), .re(b_re), .op(b_op));

  bram_array #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .a_we   (a_we),
    .a_re   (a_re),
    .a_addr (a_addr),
    .a_din  (a_din),
    .a_dout (a_dout),
    .b_we   (b_we),
    .b_re   (b_re),
    .b_addr (b_addr),
    .b_din  (b_din),
    .b_dout (b_dout)
  );

endmodule
