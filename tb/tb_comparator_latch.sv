// tb_comparator_latch: checks one comparator card's latch and flip-flop. The
// comparator output counts only at a strobe; the first strobe with the
// output high latches CLC and sets CFF; later strobes and the force pulse
// change nothing once latched; CFF reset leaves CLC latched; latch reset
// re-arms; the force pulse latches an armed channel and sets its CFF.
// A random phase then drives all inputs freely for 4000 clocks and compares
// CLC and CFF every clock with a reference model: a trip needs an armed
// latch and either a strobe with the comparator high or a force pulse; on
// the same clock latch reset wins over latching, and a trip wins over CFF
// reset.
`timescale 1ns/1ps
module tb_comparator_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cmp, stair_strobe, force_cmp, latch_reset, cff_reset, clc, cff;
  int checks = 0, failures = 0;

  comparator_latch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_clc, m_cff, n_clc, n_cff, fire;
  initial begin
    {cmp, stair_strobe, force_cmp, latch_reset, cff_reset} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) cmp = 1'b1;
    repeat (3) @(negedge clk);
    check(!clc && !cff, "comparator output ignored between strobes");
    pulse(stair_strobe);
    check(clc && cff, "strobe with comparator high latches and sets CFF");
    pulse(cff_reset);
    check(clc && !cff, "CFF reset leaves the latch set");
    pulse(stair_strobe);
    check(!cff, "latched comparator cannot set CFF again");
    pulse(force_cmp);
    check(!cff, "force does not re-trigger a latched comparator");
    pulse(latch_reset);
    check(!clc && !cff, "latch reset re-arms the comparator");
    @(negedge clk) cmp = 1'b0;
    pulse(stair_strobe);
    check(!clc && !cff, "strobe with comparator low does nothing");
    pulse(force_cmp);
    check(clc && cff, "force latches an armed comparator");

    m_clc = clc; m_cff = cff;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      cmp          = 1'($urandom_range(1));
      stair_strobe = ($urandom_range(3) == 0);
      force_cmp    = ($urandom_range(15) == 0);
      latch_reset  = ($urandom_range(15) == 0);
      cff_reset    = ($urandom_range(7) == 0);
      fire = !m_clc && ((stair_strobe && cmp) || force_cmp);
      n_clc = latch_reset ? 1'b0 : (fire ? 1'b1 : m_clc);
      n_cff = fire ? 1'b1 : (cff_reset ? 1'b0 : m_cff);
      @(posedge clk); #1;
      m_clc = n_clc; m_cff = n_cff;
      check(clc == m_clc && cff == m_cff,
            $sformatf("random step %0d: clc=%0b cff=%0b, expected %0b %0b", i, clc, cff, m_clc, m_cff));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
