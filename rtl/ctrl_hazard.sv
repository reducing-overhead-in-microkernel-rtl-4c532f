// ctrl_hazard: visibility of bank translation control register updates.
//
// The control register is read implicitly by nearly every instruction in
// Operand Fetch (source translation) and Execute (destination translation),
// but is written explicitly only when the writing instruction leaves Write
// Back. This block decides which configuration each of those two stages uses
// while a write is still in flight in Execute, DM1, DM2 or Write Back.
//
// FWD_CTRL = 0 (stalling): both stages use the committed register and
// Operand Fetch is stalled while any write is in flight. An instruction right
// behind a control register write therefore waits 4 cycles.
// FWD_CTRL = 1 (forwarding, complements the stalling logic so no stall is
// left): Operand Fetch takes the youngest in-flight value, including the
// result the ALU is producing in Execute in the same cycle; Execute takes the
// youngest value from DM1, DM2 or Write Back. An instruction in Execute never
// needs its own write, since it is the writer.
// Writes by loads are not supported (the pipeline asserts this), so every
// in-flight value is known from Execute on.
// Purely combinational. In the stalling build the two configuration outputs
// are the committed register passed through and fwd_of is constant 0: that
// is the intended hardware, not an omission. The stalling rule (4 cycles)
// and the forwarding of the Execute result in the same cycle follow the
// document; the priority of several in-flight writes (youngest wins) is
// this design's choice.
module ctrl_hazard
  import rb_pkg::*;
#(
  parameter bit FWD_CTRL = 1'b0
) (
  input  bank_ctrl_t ctrl_q,            // committed control register
  input  ctrl_wr_t   late [N_LATE],     // in-flight writes, index ST_*
  output bank_ctrl_t ctrl_of,           // configuration for Operand Fetch
  output bank_ctrl_t ctrl_ex,           // configuration for Execute
  output logic       stall_of,          // hold Operand Fetch (FWD_CTRL = 0)
  output logic       fwd_of             // Operand Fetch used a forwarded value
);
  logic any_pending;

  always_comb begin
    any_pending = 1'b0;
    for (int i = 0; i < N_LATE; i++) any_pending |= late[i].wen;

    ctrl_of  = ctrl_q;
    ctrl_ex  = ctrl_q;
    stall_of = 1'b0;
    fwd_of   = 1'b0;
    if (FWD_CTRL) begin
      // oldest first, so the youngest in-flight write wins
      for (int i = N_LATE - 1; i >= 0; i--) begin
        if (late[i].wen) begin
          ctrl_of        = bank_ctrl_t'(late[i].data);
          ctrl_of.unused = '0;
          fwd_of         = 1'b1;
          if (i != ST_EX) begin
            ctrl_ex        = bank_ctrl_t'(late[i].data);
            ctrl_ex.unused = '0;
          end
        end
      end
    end else begin
      stall_of = any_pending;
    end
  end
endmodule
