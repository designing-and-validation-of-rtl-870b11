// tb_bram_tables: replays the write table and the read table of the four-bit
// block RAM on port A, used as a single-port memory (port B's chip select held
// low), and prints each cycle as a table row: CS, WR, RD, address, data in and
// data out.
//
// Write table: an idle row, then locations 1..8 are written with 1..8; data
// out must stay 0000 throughout. Read table: an idle row, then locations 1..8
// are read with data in held at 1000; data out must show 0001..1000, each one
// clock after its address was presented, and must not change before that
// edge. Port B must read zero throughout.
module tb_bram_tables;
  logic       clk = 0;
  logic       rst_n;
  logic       a_cs, a_wr, a_rd, b_cs, b_wr, b_rd;
  logic [7:0] a_addr, b_addr;
  logic [3:0] a_din, b_din, a_dout, b_dout;
  bram_pkg::port_op_e a_op, b_op;
  int         checks = 0, failures = 0;

  bram_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one table row, clock it and check data out.
  task automatic row(logic cs, logic wr, logic rd, logic [7:0] addr, logic [3:0] din,
                     logic [3:0] exp_dout);
    logic [3:0] held;
    a_cs = cs; a_wr = wr; a_rd = rd; a_addr = addr; a_din = din;
    held = a_dout;
    #1;
    checks++;
    if (a_dout !== held) begin
      failures++;
      $display("FAIL data out changed before the clock edge");
    end
    @(posedge clk); #1;
    $display("  %b   %b   %b   %b   %b   %b", cs, wr, rd, addr, din, a_dout);
    checks++;
    if (a_dout !== exp_dout || b_dout !== 4'b0000) begin
      failures++;
      $display("FAIL expected data out %b (port B %b)", exp_dout, b_dout);
    end
  endtask

  initial begin
    {a_cs, a_wr, a_rd, b_cs, b_wr, b_rd} = '0;
    a_addr = '0; b_addr = '0; a_din = '0; b_din = '0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;

    $display("write table\n  CS  WR  RD  Addr[7:0]  Data_in  Data_out");
    row(0, 0, 0, 8'd0, 4'd0, 4'b0000);
    for (int n = 1; n <= 8; n++) row(1, 1, 0, 8'(n), 4'(n), 4'b0000);

    $display("read table\n  CS  WR  RD  Addr[7:0]  Data_in  Data_out");
    row(0, 0, 0, 8'd0, 4'b1000, 4'b0000);
    for (int n = 1; n <= 8; n++) row(1, 0, 1, 8'(n), 4'b1000, 4'(n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
