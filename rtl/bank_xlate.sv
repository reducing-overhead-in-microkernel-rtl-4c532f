// bank_xlate: register address translation (set selector evaluation).
//
// Turns a 6-bit encoded register address into the register file set (bank)
// it lives in, following the formula of the design:
//   e >= 32            -> set 0 (special purpose register, no register file
//                         access; 0 keeps forwarding comparisons uniform)
//   e >  31 - c        -> minor bank m (the top c general purpose addresses)
//   otherwise          -> major bank M
// where c, m and M come from the bank translation control register.
// Purely combinational; used twice in Operand Fetch (the two source operands)
// and once in Execute (the destination operand).
module bank_xlate
  import rb_pkg::*;
(
  input  logic [ENC_W-1:0] enc,    // encoded register address e
  input  bank_ctrl_t       ctrl,   // translation configuration (c, m, M)
  output logic [SET_W-1:0] set,    // set selector for the register file
  output logic             minor   // 1 when the minor bank was selected
);
  logic [REG_W-1:0] boundary;  // 31 - c

  always_comb begin
    boundary = REG_W'(REGS_PER_SET - 1) - ctrl.count;
    minor    = 1'b0;
    if (enc[ENC_W-1]) begin
      set = '0;
    end else if (enc[REG_W-1:0] > boundary) begin
      set   = ctrl.minor;
      minor = 1'b1;
    end else begin
      set = ctrl.major;
    end
  end
endmodule
