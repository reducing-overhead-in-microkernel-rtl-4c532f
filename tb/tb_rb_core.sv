// tb_rb_core: end-to-end test of the register-bank core, both builds side by
// side: the stalling build (default parameters) and the forwarding build.
// Each runs the random program of rb_core_env against the reference model.
// Every hazard mechanism must have occurred at least once: control register
// stalls (stalling build), control register forwarding (forwarding build),
// load-use stalls, result and load forwarding, minor bank accesses, bank
// switches, explicit control register reads and suppressed unprivileged writes.
module tb_rb_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done_s, done_f;
  int ck_s, fl_s, ck_f, fl_f;
  int sc_s, sl_s, fc_s, fr_s, flo_s, mi_s, pf_s, sr_s, bs_s;
  int sc_f, sl_f, fc_f, fr_f, flo_f, mi_f, pf_f, sr_f, bs_f;
  int checks = 0, failures = 0;

  rb_core_env #(.FWD_CTRL(1'b0)) env_s (
    .clk, .rst_n, .done(done_s), .checks(ck_s), .failures(fl_s),
    .n_stall_ctrl(sc_s), .n_stall_load(sl_s), .n_fwd_ctrl(fc_s), .n_fwd_result(fr_s),
    .n_fwd_load(flo_s), .n_minor(mi_s), .n_priv_fault(pf_s), .n_spr_read(sr_s),
    .n_bank_switch(bs_s));
  rb_core_env #(.FWD_CTRL(1'b1)) env_f (
    .clk, .rst_n, .done(done_f), .checks(ck_f), .failures(fl_f),
    .n_stall_ctrl(sc_f), .n_stall_load(sl_f), .n_fwd_ctrl(fc_f), .n_fwd_result(fr_f),
    .n_fwd_load(flo_f), .n_minor(mi_f), .n_priv_fault(pf_f), .n_spr_read(sr_f),
    .n_bank_switch(bs_f));

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck_s + ck_f, failures + fl_s + fl_f + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_s && done_f);
    @(posedge clk);
    $display("stalling build:   ctrl stalls %0d, load stalls %0d, result fwd %0d, load fwd %0d, minor %0d, priv faults %0d, ctrl reads %0d, bank switches %0d",
             sc_s, sl_s, fr_s, flo_s, mi_s, pf_s, sr_s, bs_s);
    $display("forwarding build: ctrl fwd %0d, ctrl stalls %0d, load stalls %0d, result fwd %0d, load fwd %0d, minor %0d, priv faults %0d, ctrl reads %0d, bank switches %0d",
             fc_f, sc_f, sl_f, fr_f, flo_f, mi_f, pf_f, sr_f, bs_f);
    need("control register stall", sc_s);
    need("control register forwarding", fc_f);
    need("load-use stall (stalling build)", sl_s);
    need("load-use stall (forwarding build)", sl_f);
    need("result forwarding", fr_s * fr_f);
    need("load forwarding", flo_s * flo_f);
    need("minor bank access", mi_s * mi_f);
    need("unprivileged write suppressed", pf_s * pf_f);
    need("explicit control register read", sr_s * sr_f);
    need("bank switch", bs_s * bs_f);
    checks++;
    if (sc_f != 0 || fc_s != 0) begin
      failures++;
      $display("FAIL a build used the other build's control register scheme");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck_s + ck_f, failures + fl_s + fl_f);
    $finish;
  end
endmodule
