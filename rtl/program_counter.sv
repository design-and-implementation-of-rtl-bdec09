// program_counter: instruction pointer, data pointer (link register) and jump
// decision of the processor.
//
// `pc` is the 6-bit address of the instruction being executed; it drives the
// memory's instruction port and the fetched word comes back on `data_in`,
// which leaves the block as `instruction`. At each rising edge with `pc_en`
// high the PC either loads the jump target, when the decoded jump condition
// holds for the Zero and Sign flags, or steps to the next address through
// the incrementer. `pc_clear` (start of a program) sets it to 0 and takes
// priority. Conditions: JMP always, JZ Zero set, JNZ Zero clear, JP Sign and
// Zero both clear, JN Sign set. The link register `link` records the 6-bit
// data address of each LOAD/STORE (`ls_en`); the access itself uses that
// address in the same cycle, from the decoder.
// The 6-bit pointers, the increment/load behaviour and the flag inputs follow
// the design; treating JP as "strictly positive" and wrapping past address
// 63 are this design's choices. Both registers clear on reset.
module program_counter
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pc_en,
  input  logic   pc_clear,
  input  jcond_e jcond,
  input  maddr_t jtarget,
  input  logic   zero_flag,
  input  logic   sign_flag,
  input  logic   ls_en,
  input  maddr_t ls_addr,
  input  word_t  data_in,
  output maddr_t pc,
  output word_t  instruction,
  output maddr_t link,
  output logic   taken
);
  maddr_t pc_inc;
  logic   unused_wrap;

  incrementer #(.W(MAW)) u_inc (.a(pc), .y(pc_inc), .carry_out(unused_wrap));

  always_comb begin
    unique case (jcond)
      JC_ALWAYS: taken = 1'b1;
      JC_Z:      taken = zero_flag;
      JC_NZ:     taken = ~zero_flag;
      JC_P:      taken = ~sign_flag & ~zero_flag;
      JC_N:      taken = sign_flag;
      default:   taken = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      link <= '0;
    end else begin
      if (pc_clear)   pc <= '0;
      else if (pc_en) pc <= taken ? jtarget : pc_inc;
      if (pc_en && ls_en) link <= ls_addr;
    end
  end

  assign instruction = data_in;
endmodule
