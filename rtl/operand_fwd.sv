// operand_fwd: result and load forwarding for one source operand, bank aware.
//
// Compares the translated source operand (set selector plus encoded address)
// with the translated destinations of the instructions in Execute, DM1, DM2
// and Write Back. Comparing the set as well as the address is the only change
// register banks need here: a write to r5 of bank 3 must not feed a read of
// r5 of bank 7. Special purpose registers carry set 0, so explicit reads of
// them are forwarded by the same comparison.
//
// The youngest matching writer supplies the value. ALU results are available
// from Execute on; a load's value only after it has passed Data Memory, i.e.
// in Write Back. If the youngest match is a load still in Execute, DM1 or
// DM2, stall is raised (up to 3 cycles). Write Back is forwarded too because
// the register file returns the old value when it is read and written in the
// same cycle.
// Purely combinational.
module operand_fwd
  import rb_pkg::*;
(
  input  logic            used,           // operand is read by the instruction
  input  rf_addr_t        src,            // translated source operand
  input  prod_t           late [N_LATE],  // in-flight writes, index ST_*
  output logic            hit,            // take data instead of the register
  output logic [XLEN-1:0] data,
  output logic            stall,          // load result not yet available
  output logic            from_load       // forwarded value came from a load
);
  always_comb begin
    hit       = 1'b0;
    data      = '0;
    stall     = 1'b0;
    from_load = 1'b0;
    // oldest first, so the youngest match wins
    for (int i = N_LATE - 1; i >= 0; i--) begin
      if (used && late[i].wen && late[i].dst == src) begin
        if (late[i].is_load && i != ST_WB) begin
          hit   = 1'b0;
          stall = 1'b1;
          from_load = 1'b0;
        end else begin
          hit   = 1'b1;
          stall = 1'b0;
          data  = late[i].data;
          from_load = late[i].is_load;
        end
      end
    end
  end
endmodule
