// tb_tdc_synchronizer: feeds sequences of {first,last} samples and checks the
// Mealy outputs and the state against a reference model written from the
// transition table: normal fill/full/empty, the line seen filling twice, a
// short hit going straight from filling to emptying, pause and return to idle
// on end of measurement.
`timescale 1ns / 1ps
module tb_tdc_synchronizer;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, first, last, eom;
  logic sf, sl, ce, cc, fv, lv;
  sync_state_t st;

  tdc_synchronizer dut (.clk_i(clk), .rst_i(rst), .en_i(en), .first_i(first), .last_i(last), .eom_i(eom),
                        .store_first_o(sf), .store_last_o(sl), .cnt_en_o(ce), .cnt_clr_o(cc),
                        .first_valid_o(fv), .last_valid_o(lv), .state_o(st));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  // Reference model.
  sync_state_t m_st;
  logic m_sf, m_sl, m_ce, m_sf_q, m_sl_q;
  always_comb begin
    m_sf = 0; m_sl = 0; m_ce = 0;
    if (en) case (m_st)
      S_IDLE:     m_sf = first & ~last;
      S_FILLING:  begin m_ce = first; m_sl = ~first & last; end
      S_FULL:     begin m_ce = first; m_sl = ~first; end
      default: ;
    endcase
  end
  always @(posedge clk) begin
    if (rst) begin m_st <= S_IDLE; m_sf_q <= 0; m_sl_q <= 0; end
    else begin
      m_sf_q <= m_sf; m_sl_q <= m_sl;
      if (en) case (m_st)
        S_IDLE:     if (first & ~last) m_st <= S_FILLING;
        S_FILLING:  if (first) m_st <= S_FULL; else if (last) m_st <= S_EMPTYING;
        S_FULL:     if (!first) m_st <= S_EMPTYING;
        S_EMPTYING: if (eom) m_st <= S_IDLE;
        default: ;
      endcase
    end
  end

  int n_twice = 0, n_short = 0, n_full = 0;

  task automatic step(input logic f, input logic l, input logic e = 0, input logic pause = 0);
    @(negedge clk);
    first = f; last = l; eom = e; en = !pause;
    #0.5;
    check(sf == m_sf && sl == m_sl && ce == m_ce && cc == (m_st == S_IDLE), $sformatf("outputs in %s for %b%b", m_st.name(), f, l));
    check(st == m_st && fv == m_sf_q && lv == m_sl_q, "state and valid pulses");
    if (m_st == S_FILLING && f && !l) n_twice++;
    if (m_st == S_FILLING && !f && l) n_short++;
    if (m_st == S_FULL && f) n_full++;
  endtask

  task automatic finish_meas();
    repeat (3) step(0, 0);
    step(0, 0, 1);
    step(0, 0);
  endtask

  initial begin
    #20000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; en = 1; first = 0; last = 0; eom = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // normal hit: 10, 11 x5, 01
    step(0, 0); step(1, 0); repeat (5) step(1, 1); step(0, 1); finish_meas();
    // line longer than a period: 10 seen twice
    step(1, 0); step(1, 0); repeat (3) step(1, 1); step(0, 1); finish_meas();
    // short hit: filling then emptying
    step(1, 0); step(0, 1); finish_meas();
    // pause in the middle
    step(1, 0); step(1, 1, 0, 1); step(1, 1, 0, 1); step(1, 1); step(0, 1); finish_meas();
    // random sequences
    for (int i = 0; i < 400; i++) step($urandom_range(0, 1), $urandom_range(0, 1), ($urandom_range(0, 7) == 0), ($urandom_range(0, 9) == 0));
    check(n_twice > 0 && n_short > 0 && n_full > 0, "all transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
