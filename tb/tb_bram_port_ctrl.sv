// tb_bram_port_ctrl: exhaustive check of the port control decoder.
//
// Applies all eight combinations of cs, wr and rd several times and compares
// we, re and op with the expected truth table: write when cs and wr, read when
// cs and rd without wr, idle otherwise.
module tb_bram_port_ctrl;
  import bram_pkg::*;

  logic     cs, wr, rd;
  logic     we, re;
  port_op_e op;
  int       checks = 0, failures = 0;

  bram_port_ctrl dut (.cs(cs), .wr(wr), .rd(rd), .we(we), .re(re), .op(op));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic     exp_we, exp_re;
    port_op_e exp_op;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {cs, wr, rd} = 3'(v);
        #1;
        exp_we = (v == 3'b110) || (v == 3'b111);
        exp_re = (v == 3'b101);
        exp_op = exp_we ? OP_WRITE : (exp_re ? OP_READ : OP_IDLE);
        checks++;
        if (we !== exp_we || re !== exp_re || op !== exp_op) begin
          failures++;
          $display("FAIL cs=%0b wr=%0b rd=%0b: we=%0b re=%0b op=%s, expected we=%0b re=%0b op=%s",
                   cs, wr, rd, we, re, op.name(), exp_we, exp_re, exp_op.name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
