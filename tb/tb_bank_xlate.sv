// tb_bank_xlate: exhaustive check of the register address translation.
// For every minor bank register count c (0..31) and every encoded address e
// (0..63), with random major and minor bank ids, the set selector is compared
// with the formula written out independently here.
module tb_bank_xlate;
  import rb_pkg::*;
  logic [ENC_W-1:0] enc;
  bank_ctrl_t       ctrl;
  logic [SET_W-1:0] set;
  logic             minor;
  int checks = 0, failures = 0;

  bank_xlate dut (.enc, .ctrl, .set, .minor);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_set; bit exp_minor;
    for (int c = 0; c < 32; c++) begin
      for (int e = 0; e < 64; e++) begin
        ctrl = '0;
        ctrl.count = 5'(c);
        ctrl.major = 4'($urandom);
        ctrl.minor = 4'($urandom);
        ctrl.unused = 19'($urandom);   // must not matter
        enc = 6'(e);
        #1;
        if (e >= 32)            begin exp_set = 0;          exp_minor = 0; end
        else if (e >= 32 - c)   begin exp_set = ctrl.minor; exp_minor = 1; end
        else                    begin exp_set = ctrl.major; exp_minor = 0; end
        checks++;
        if (set != 4'(exp_set) || minor != exp_minor) begin
          failures++;
          $display("FAIL e=%0d c=%0d set=%0d exp=%0d", e, c, set, exp_set);
        end
      end
    end
    // the example of the figure: r24..r31 on the minor bank
    ctrl = '0; ctrl.count = 5'd8; ctrl.major = 4'd5; ctrl.minor = 4'd9;
    enc = 6'd23; #1; checks++; if (set != 4'd5) failures++;
    enc = 6'd24; #1; checks++; if (set != 4'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
