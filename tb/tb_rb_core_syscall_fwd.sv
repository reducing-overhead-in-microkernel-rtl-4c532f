// tb_rb_core_syscall_fwd: the system call workload of rb_syscall_env on the
// forwarding build of the core: control register values are forwarded, so
// the bank switches of kernel entry and exit cost no stall cycles.
module tb_rb_core_syscall_fwd;
  import rb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic            in_valid, in_ready;
  uop_t            in_uop;
  logic            dmem_req, dmem_we;
  logic [XLEN-1:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic            wb_valid, wb_wen;
  rf_addr_t        wb_dst;
  logic [XLEN-1:0] wb_data;
  bank_ctrl_t      bank_ctrl;
  logic            priv_fault;
  logic            ev_stall_ctrl, ev_stall_load, ev_fwd_ctrl, ev_fwd_result, ev_fwd_load,
                   ev_minor_access;

  rb_core #(.FWD_CTRL(1'b1)) dut (.*);
  logic done;
  int   checks, failures;

  rb_syscall_env #(.FWD_CTRL(1'b1)) env (.*);

  initial begin
    fork
      wait (done);
      repeat (50000) @(posedge clk);
    join_any
    if (done)
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    else
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
