// tb_bram_array: randomised check of the dual-port storage array.
//
// Drives both ports with random enables, addresses and data for a few
// thousand cycles, on a narrowed address space so that same-address clashes
// between the ports happen often, and compares both read registers after every
// clock edge with a reference model kept in the testbench: read-before-write,
// port A winning a write clash, dout holding between reads, one clock of read
// latency. It first checks that the array powers up holding zero and that
// reset clears the output registers.
module tb_bram_array;
  localparam int unsigned DW = bram_pkg::DATA_W_DEF;
  localparam int unsigned AW = bram_pkg::ADDR_W_DEF;
  localparam int unsigned DEPTH = 1 << AW;

  logic          clk = 0;
  logic          rst_n;
  logic          a_we, a_re, b_we, b_re;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_din, b_din, a_dout, b_dout;

  logic [DW-1:0] ref_mem [DEPTH];
  logic [DW-1:0] exp_a, exp_b;
  int            checks = 0, failures = 0;
  int            clashes = 0;

  bram_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (a_dout !== exp_a || b_dout !== exp_b) begin
      failures++;
      $display("FAIL %s t=%0t: a_dout=%h (exp %h) b_dout=%h (exp %h)", what, $time, a_dout, exp_a, b_dout, exp_b);
    end
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    {a_we, a_re, b_we, b_re} = '0;
    a_addr = '0; b_addr = '0; a_din = '0; b_din = '0;
    rst_n = 0;
    @(posedge clk); #1;
    exp_a = '0; exp_b = '0;
    check("reset");
    rst_n = 1;

    // Power-up contents: every location reads zero.
    for (int i = 0; i < DEPTH; i += 2) begin
      a_re = 1; b_re = 1; a_addr = AW'(i); b_addr = AW'(i + 1);
      @(posedge clk); #1;
      check("power-up zero");
    end

    // Random traffic on the low 16 locations.
    for (int n = 0; n < 3000; n++) begin
      a_we = 1'($urandom_range(0, 1)); a_re = ~a_we & 1'($urandom_range(0, 1));
      b_we = 1'($urandom_range(0, 1)); b_re = ~b_we & 1'($urandom_range(0, 1));
      a_addr = AW'($urandom_range(0, 15)); b_addr = AW'($urandom_range(0, 15));
      a_din = DW'($urandom); b_din = DW'($urandom);
      if (a_addr == b_addr && (a_we || b_we)) clashes++;
      // reference: reads see the old contents, then writes, A last
      if (a_re) exp_a = ref_mem[a_addr];
      if (b_re) exp_b = ref_mem[b_addr];
      if (b_we) ref_mem[b_addr] = b_din;
      if (a_we) ref_mem[a_addr] = a_din;
      @(posedge clk); #1;
      check("random");
    end

    // Reset clears the output registers but not the stored words.
    rst_n = 0; {a_we, a_re, b_we, b_re} = '0;
    @(posedge clk); #1;
    exp_a = '0; exp_b = '0;
    check("reset clears dout");
    rst_n = 1;
    a_re = 1; a_addr = 8'd3; b_re = 1; b_addr = 8'd7;
    exp_a = ref_mem[3]; exp_b = ref_mem[7];
    @(posedge clk); #1;
    check("contents kept over reset");

    checks++;
    if (clashes == 0) begin
      failures++;
      $display("FAIL no same-address clash was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
