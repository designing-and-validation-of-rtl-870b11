// bram_array: storage of the block RAM, 2**ADDR_W words of DATA_W bits,
// with two fully independent synchronous ports A and B on one clock.
//
// On a rising clock edge each port either writes din to mem[addr] (we high)
// or copies mem[addr] into its output register dout (re high); dout holds its
// value in every other cycle. Read data is therefore available one clock after
// the edge that samples the address. The two ports may work on different
// locations in the same cycle, which is how a read and a write happen
// simultaneously.
//
// Choices made here, where the description of the design is silent:
//  * A read that meets a write to the same location on the other port returns
//    the old contents (read-before-write).
//  * If both ports write the same location in the same cycle, port A wins.
//  * The memory powers up holding zero in every location, and the synchronous
//    active-low reset clears only the two output registers, as the block RAM
//    of an FPGA does; the stored words are not cleared by reset. The zero
//    power-up contents are written as the array's declaration initialiser,
//    which synthesis maps to the block RAM's initial contents (a linter may
//    note that the array also has procedural writes; that is intended).
module bram_array #(
  parameter int unsigned DATA_W = bram_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W = bram_pkg::ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A
  input  logic              a_we,
  input  logic              a_re,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_din,
  output logic [DATA_W-1:0] a_dout,
  // port B
  input  logic              b_we,
  input  logic              b_re,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_din,
  output logic [DATA_W-1:0] b_dout
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH] = '{default: '0};

  // Writes: port B first so that port A overrides it on an address clash.
  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_din;
    if (a_we) mem[a_addr] <= a_din;
  end

  // Registered reads; the nonblocking writes above are not yet visible here,
  // which gives read-before-write.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_dout <= '0;
    end else if (a_re) begin
      a_dout <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_dout <= '0;
    end else if (b_re) begin
      b_dout <= mem[b_addr];
    end
  end

endmodule
