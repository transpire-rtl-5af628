// pe_controller: program sequencing of a processing element, holding the
// Jump Register (JR) and Condition Register (CR) functions.
//
// The program counter starts at 0 when a kernel starts (`start`) and the PE
// leaves its halted state. When the Instruction Synchronizer raises
// `fetch_en` the current instruction retires and the next PC is chosen:
// JMP goes to its target jt; CJMP goes to jt if the OR of the condition bits
// of all PEs (`cr_all`) is 1 and to jf otherwise, as the architecture's
// two-address conditional jump does; EXIT halts the PE; every other
// instruction falls through to PC+1. Compare instructions write their result
// into this PE's 1-bit CR (`cr_we`/`cr_in` at retirement); `cr` is broadcast
// to all PEs. Timing: the next PC and CR take effect at the clock edge that
// ends the retiring cycle. Reset leaves the PE halted with PC 0.
module pe_controller
  import transpire_pkg::*;
#(
  parameter int unsigned N_PE = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            fetch_en,
  input  opcode_e         op,
  input  logic [PC_W-1:0] jt,
  input  logic [PC_W-1:0] jf,
  input  logic [N_PE-1:0] cr_all,
  input  logic            cr_we,
  input  logic            cr_in,
  output logic [PC_W-1:0] pc,
  output logic            halted,
  output logic            cr,
  output logic            jump_taken   // a JMP or CJMP is changing the flow this cycle
);
  logic [PC_W-1:0] jr;   // resolved jump target

  always_comb begin
    jr = (op == OP_CJMP && !(|cr_all)) ? jf : jt;
    jump_taken = fetch_en && (op == OP_JMP || op == OP_CJMP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; halted <= 1'b1; cr <= 1'b0;
    end else if (start) begin
      pc <= '0; halted <= 1'b0; cr <= 1'b0;
    end else if (fetch_en) begin
      if (cr_we) cr <= cr_in;
      case (op)
        OP_EXIT:         halted <= 1'b1;
        OP_JMP, OP_CJMP: pc <= jr;
        default:         pc <= pc + 1'b1;
      endcase
    end
  end
endmodule
