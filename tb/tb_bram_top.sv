// tb_bram_top: end-to-end test of the dual-port block RAM at its default size
// (4-bit words, 256 locations).
//
// Every cycle goes through one task that drives both ports, updates a
// reference model kept in the testbench, waits for the clock edge and
// compares both data outputs (and, before the edge, the decoded operations)
// with the model. The sequence is:
//  1. reset and an idle cycle with CS low;
//  2. the write sequence of the design's write table on port A: locations 1..8
//     receive 1..8 while data out keeps showing 0000;
//  3. the read sequence of the read table on port A: the same locations read
//     back 1..8, each one clock after its address, with data in left at 1000;
//  4. directed cases: WR with CS low (no write), WR and RD together on one
//     port (write wins, data out holds), a write on A with a read on B in the
//     same cycle, two reads, two writes, a read meeting a write to the same
//     location (old data) and two writes to one location (port A wins);
//  5. a full sweep writing all 256 locations through port A while port B reads
//     each one back the cycle after it was written;
//  6. random traffic on both ports.
// Each mechanism is counted, and one that never happened counts a failure.
module tb_bram_top;
  import bram_pkg::*;
  localparam int unsigned DW = DATA_W_DEF;
  localparam int unsigned AW = ADDR_W_DEF;
  localparam int unsigned DEPTH = 1 << AW;

  logic          clk = 0;
  logic          rst_n;
  logic          a_cs, a_wr, a_rd, b_cs, b_wr, b_rd;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_din, b_din, a_dout, b_dout;
  port_op_e      a_op, b_op;

  bram_top dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] ref_mem [DEPTH];
  logic [DW-1:0] exp_a, exp_b;
  int            checks = 0, failures = 0;

  typedef enum int {
    M_WRITE, M_READ, M_IDLE, M_CS_BLOCKED, M_WR_PRIORITY, M_SIM_RW, M_SIM_RR,
    M_SIM_WW, M_RBW, M_WW_CLASH, M_NUM
  } mech_e;
  int    mech [M_NUM];
  string mech_name [M_NUM] = '{"write", "read", "idle", "cs_blocked_write", "wr_over_rd",
                               "simultaneous_read_write", "simultaneous_reads",
                               "simultaneous_writes", "read_before_write_collision",
                               "write_write_clash"};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // One clock cycle on both ports.
  task automatic cycle(input logic acs, awr, ard, input int aad, input int adi,
                       input logic bcs, bwr, brd, input int bad, input int bdi,
                       input string what);
    logic     awe, are, bwe, bre;
    port_op_e aop, bop;
    a_cs = acs; a_wr = awr; a_rd = ard; a_addr = AW'(aad); a_din = DW'(adi);
    b_cs = bcs; b_wr = bwr; b_rd = brd; b_addr = AW'(bad); b_din = DW'(bdi);
    awe = acs & awr; are = acs & ard & ~awr;
    bwe = bcs & bwr; bre = bcs & brd & ~bwr;
    aop = awe ? OP_WRITE : (are ? OP_READ : OP_IDLE);
    bop = bwe ? OP_WRITE : (bre ? OP_READ : OP_IDLE);
    // mechanism counts
    if (awe || bwe) mech[M_WRITE]++;
    if (are || bre) mech[M_READ]++;
    if (!acs && !bcs) mech[M_IDLE]++;
    if ((!acs && awr) || (!bcs && bwr)) mech[M_CS_BLOCKED]++;
    if ((acs && awr && ard) || (bcs && bwr && brd)) mech[M_WR_PRIORITY]++;
    if ((awe && bre) || (bwe && are)) mech[M_SIM_RW]++;
    if (are && bre) mech[M_SIM_RR]++;
    if (awe && bwe && a_addr != b_addr) mech[M_SIM_WW]++;
    if (((awe && bre) || (bwe && are)) && a_addr == b_addr) mech[M_RBW]++;
    if (awe && bwe && a_addr == b_addr) mech[M_WW_CLASH]++;
    // reference model: reads see old contents, then B writes, then A
    if (are) exp_a = ref_mem[a_addr];
    if (bre) exp_b = ref_mem[b_addr];
    if (bwe) ref_mem[b_addr] = b_din;
    if (awe) ref_mem[a_addr] = a_din;
    #1;
    checks++;
    if (a_op !== aop || b_op !== bop)
      fail($sformatf("%s: op a=%s b=%s, expected a=%s b=%s", what, a_op.name(), b_op.name(),
                     aop.name(), bop.name()));
    @(posedge clk); #1;
    checks++;
    if (a_dout !== exp_a || b_dout !== exp_b)
      fail($sformatf("%s: a_dout=%b (exp %b) b_dout=%b (exp %b)", what, a_dout, exp_a, b_dout, exp_b));
  endtask

  task automatic idle(string what);
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 0, what);
  endtask

  task automatic expect_a(logic [DW-1:0] v, string what);
    checks++;
    if (a_dout !== v) fail($sformatf("%s: a_dout=%b, table says %b", what, a_dout, v));
  endtask

  initial begin
    int a, b;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    foreach (mech[i]) mech[i] = 0;
    exp_a = '0; exp_b = '0;
    {a_cs, a_wr, a_rd, b_cs, b_wr, b_rd} = '0;
    a_addr = '0; b_addr = '0; a_din = '0; b_din = '0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;

    // 1. idle: nothing written or read, data out 0000
    idle("idle after reset");
    expect_a(4'b0000, "idle row");

    // 2. write table: address n gets n, data out stays 0000
    for (int n = 1; n <= 8; n++) begin
      cycle(1, 1, 0, n, n, 0, 0, 0, 0, 0, "write table");
      expect_a(4'b0000, "write table data out");
    end

    // 3. read table: data in held at 1000, data out follows one clock later
    for (int n = 1; n <= 8; n++) begin
      logic [DW-1:0] prev_dout;
      prev_dout = a_dout;
      a_cs = 1; a_wr = 0; a_rd = 1; a_addr = AW'(n); a_din = 4'b1000;
      #2;
      checks++;
      if (a_dout !== prev_dout) fail("read data appeared before the clock edge");
      cycle(1, 0, 1, n, 8, 0, 0, 0, 0, 0, "read table");
      expect_a(DW'(n), "read table data out");
    end

    // 4. directed cases
    cycle(0, 1, 0, 20, 5, 0, 1, 0, 21, 6, "write with CS low");
    cycle(1, 0, 1, 20, 0, 1, 0, 1, 21, 0, "read back locations CS blocked");
    expect_a(4'b0000, "CS-low write left location 20 at zero");
    cycle(1, 1, 1, 30, 9, 0, 0, 0, 0, 0, "WR and RD on one port");
    expect_a(4'b0000, "data out held while WR overrides RD");
    cycle(1, 0, 1, 30, 0, 0, 0, 0, 0, 0, "read location written by WR+RD");
    expect_a(4'd9, "WR+RD cycle wrote location 30");
    cycle(1, 1, 0, 40, 3, 1, 0, 1, 5, 0, "A writes, B reads");
    cycle(1, 0, 1, 40, 0, 1, 1, 0, 41, 12, "A reads, B writes");
    cycle(1, 0, 1, 41, 0, 1, 0, 1, 40, 0, "both read");
    cycle(1, 1, 0, 50, 7, 1, 1, 0, 51, 11, "both write");
    cycle(1, 1, 0, 50, 2, 1, 0, 1, 50, 0, "A writes, B reads same location");
    cycle(1, 0, 1, 50, 0, 1, 1, 0, 50, 13, "B writes, A reads same location");
    cycle(1, 1, 0, 60, 4, 1, 1, 0, 60, 14, "both write same location");
    cycle(0, 0, 0, 0, 0, 1, 0, 1, 60, 0, "read clash location");
    checks++;
    if (b_dout !== 4'd4) fail("port A did not win the write clash");

    // 5. full sweep: A writes every location, B reads the previous one
    for (int n = 0; n <= DEPTH; n++) begin
      cycle(n < DEPTH, 1, 0, n % DEPTH, (n * 7 + 3) % 16,
            n > 0, 0, 1, (n + DEPTH - 1) % DEPTH, 0, "full sweep");
    end
    for (int n = 0; n < DEPTH; n++) begin
      cycle(0, 0, 0, 0, 0, 1, 0, 1, n, 0, "sweep read-back");
      checks++;
      if (b_dout !== DW'((n * 7 + 3) % 16)) fail($sformatf("sweep location %0d", n));
    end

    // 6. random traffic; a narrow address range now and then forces clashes
    for (int n = 0; n < 4000; n++) begin
      int lim;
      lim = (n % 2 != 0) ? DEPTH - 1 : 7;
      a = $urandom_range(0, lim);
      b = $urandom_range(0, lim);
      cycle(1'($urandom_range(0, 3) != 0), 1'($urandom), 1'($urandom), a, $urandom,
            1'($urandom_range(0, 3) != 0), 1'($urandom), 1'($urandom), b, $urandom, "random");
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
