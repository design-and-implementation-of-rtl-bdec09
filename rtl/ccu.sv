// ccu: clock control unit. Schedules which blocks of the processor act in
// each clock cycle and keeps the run/halt state.
//
// States: IDLE after reset, RUN while a program executes, HALTED after a HALT
// instruction. A `start` pulse in IDLE or HALTED clears the program counter
// (`pc_clear`) and enters RUN. In RUN every cycle runs one instruction:
// `idu_en` and the write-timing strobe `we_t` are high, `pc_en` is high
// unless the instruction is HALT (the PC then stays on the HALT), and
// `alu_en` is high only when the decoded instruction is an ALU instruction,
// so the ALU's flag register is selected only when it has work. A decoded
// HALT moves to HALTED at the end of its cycle, after which all enables stay
// low. `cycles` counts RUN cycles since the last start, HALT included, so it
// equals the number of instructions executed.
// The enable names follow the design's block diagram; the state machine, the
// start input and the cycle counter are this design's own, since the design
// gives the unit's purpose only.
module ccu
  import risc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  halt,       // decoded HALT
  input  logic  alu_inst,   // decoded instruction uses the ALU
  output logic  pc_en,
  output logic  pc_clear,
  output logic  idu_en,
  output logic  alu_en,
  output logic  we_t,
  output logic  running,
  output logic  halted,
  output word_t cycles
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HALTED} state_e;
  state_e state;

  assign running  = (state == S_RUN);
  assign halted   = (state == S_HALTED);
  assign idu_en   = running;
  assign we_t     = running;
  assign pc_en    = running & ~halt;
  assign alu_en   = running & alu_inst;
  assign pc_clear = start & ~running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_HALTED: if (start) begin
          state  <= S_RUN;
          cycles <= '0;
        end
        S_RUN: begin
          cycles <= cycles + 1'b1;
          if (halt) state <= S_HALTED;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
