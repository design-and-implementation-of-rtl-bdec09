// tb_winograd: runs the 3 x 2 linear convolution s = x * h on the processor
// with the four-multiplication (Winograd / Toom-Cook) method, and checks the
// four outputs against the direct convolution
//   s0 = h0 x0, s1 = h0 x1 + h1 x0, s2 = h0 x2 + h1 x1, s3 = h1 x2
// and that the 26-instruction program takes exactly 26 clock cycles.
//
// The input x is evaluated at the points 0, 1, -1 and infinity by the
// program (x0, x0+x1+x2, x0-x1+x2, x2). The filter's four values are
// prepared in memory beforehand, doubled so that every output needs only a
// final shift right by one: H0 = 2 h0, H1 = h0 + h1, H2 = h0 - h1, H3 = 2 h1.
// Then with m0 = H0 x0, m1 = H1 (x0+x1+x2), m2 = H2 (x0-x1+x2), m3 = H3 x2:
//   s0 = m0/2, s1 = (m1 - m2 - m3)/2, s2 = (m1 + m2 - m0)/2, s3 = m3/2.
// Inputs: x values of 6 bits and h values of 3 bits, unsigned, plus a set of
// signed (two's complement) inputs; data lies at addresses 32..38, above the
// program. Results are left in R0 (s0), R5 (s1), R3 (s2) and R2 (s3).
//
// A second program uses the processor as a multiply-accumulate engine: four
// unrolled LOAD/LOAD/MUL/ADD groups form a 4-term dot product, which is
// stored to memory; 19 instructions, checked to take 19 cycles.
module tb_winograd;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0;
  logic   host_we = 0;
  maddr_t host_addr = '0;
  word_t  host_wdata = '0, host_rdata;
  raddr_t dbg_reg_addr = '0;
  word_t  dbg_reg_data, cycles;
  logic   running, halted, zero_flag, sign_flag;
  maddr_t pc, link;

  risc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t prog [26];

  task automatic host_write(input int addr, input word_t data);
    @(negedge clk);
    host_addr = maddr_t'(addr); host_wdata = data; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic reg_value(input int r, output int v);
    dbg_reg_addr = raddr_t'(r);
    #1;
    v = int'($signed(dbg_reg_data));
  endtask

  task automatic convolve(input int x0, x1, x2, h0, h1);
    int s [4];
    int got [4];
    host_write(32, word_t'(x0));
    host_write(33, word_t'(x1));
    host_write(34, word_t'(x2));
    host_write(35, word_t'(2 * h0));
    host_write(36, word_t'(h0 + h1));
    host_write(37, word_t'(h0 - h1));
    host_write(38, word_t'(2 * h1));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (halted);
    @(negedge clk);
    s[0] = h0 * x0;
    s[1] = h0 * x1 + h1 * x0;
    s[2] = h0 * x2 + h1 * x1;
    s[3] = h1 * x2;
    reg_value(0, got[0]);
    reg_value(5, got[1]);
    reg_value(3, got[2]);
    reg_value(2, got[3]);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] != s[i]) begin
        failures++;
        $display("FAIL x=(%0d,%0d,%0d) h=(%0d,%0d): s%0d = %0d, expected %0d",
                 x0, x1, x2, h0, h1, i, got[i], s[i]);
      end
    end
    checks++;
    if (cycles != 16'd26) begin
      failures++;
      $display("FAIL program took %0d cycles, expected 26", cycles);
    end
  endtask

  initial begin
    prog[0]  = f_load(0, 32);           // R0 = x0
    prog[1]  = f_load(1, 33);           // R1 = x1
    prog[2]  = f_load(2, 34);           // R2 = x2
    prog[3]  = f_reg(OP_MOV, 3, 2);     // R3 = x2
    prog[4]  = f_reg(OP_ADD, 3, 0);     // R3 = x0 + x2
    prog[5]  = f_reg(OP_MOV, 4, 3);     // R4 = x0 + x2
    prog[6]  = f_reg(OP_ADD, 3, 1);     // R3 = x0 + x1 + x2
    prog[7]  = f_reg(OP_SUB, 4, 1);     // R4 = x0 - x1 + x2
    prog[8]  = f_load(5, 35);           // R5 = H0
    prog[9]  = f_load(6, 36);           // R6 = H1
    prog[10] = f_load(7, 37);           // R7 = H2
    prog[11] = f_reg(OP_MUL, 0, 5);     // R0 = m0
    prog[12] = f_load(5, 38);           // R5 = H3
    prog[13] = f_reg(OP_MUL, 3, 6);     // R3 = m1
    prog[14] = f_reg(OP_MUL, 4, 7);     // R4 = m2
    prog[15] = f_reg(OP_MUL, 2, 5);     // R2 = m3
    prog[16] = f_reg(OP_MOV, 5, 3);     // R5 = m1
    prog[17] = f_reg(OP_SUB, 5, 4);     // R5 = m1 - m2
    prog[18] = f_reg(OP_SUB, 5, 2);     // R5 = m1 - m2 - m3
    prog[19] = f_reg(OP_SR, 5, 5);      // R5 = s1
    prog[20] = f_reg(OP_ADD, 3, 4);     // R3 = m1 + m2
    prog[21] = f_reg(OP_SUB, 3, 0);     // R3 = m1 + m2 - m0
    prog[22] = f_reg(OP_SR, 3, 3);      // R3 = s2
    prog[23] = f_reg(OP_SR, 0, 0);      // R0 = s0
    prog[24] = f_reg(OP_SR, 2, 2);      // R2 = s3
    prog[25] = f_halt();

    #12 rst_n = 1;
    for (int i = 0; i < 26; i++) host_write(i, prog[i]);

    convolve(1, 2, 3, 4, 5);
    convolve(63, 63, 63, 7, 7);         // largest inputs of the stated widths
    convolve(0, 63, 0, 7, 0);
    convolve(63, 0, 63, 0, 7);
    for (int n = 0; n < 200; n++)
      convolve(int'($urandom % 64), int'($urandom % 64), int'($urandom % 64),
               int'($urandom % 8), int'($urandom % 8));
    for (int n = 0; n < 100; n++)       // signed samples and coefficients
      convolve(int'($urandom % 128) - 64, int'($urandom % 128) - 64,
               int'($urandom % 128) - 64, int'($urandom % 16) - 8, int'($urandom % 16) - 8);
    // ---- multiply-accumulate: acc = sum a[k] * b[k], k = 0..3 ----
    host_write(0, f_reg(OP_XOR, 0, 0));
    for (int k = 0; k < 4; k++) begin
      host_write(1 + 4*k, f_load(1, 40 + k));
      host_write(2 + 4*k, f_load(2, 44 + k));
      host_write(3 + 4*k, f_reg(OP_MUL, 1, 2));
      host_write(4 + 4*k, f_reg(OP_ADD, 0, 1));
    end
    host_write(17, f_store(48, 0));
    host_write(18, f_halt());
    for (int n = 0; n < 50; n++) begin
      int av [4], bv [4], acc;
      acc = 0;
      for (int k = 0; k < 4; k++) begin
        av[k] = int'($urandom % 256) - 128;
        bv[k] = int'($urandom % 256) - 128;
        acc  += av[k] * bv[k];
        host_write(40 + k, word_t'(av[k]));
        host_write(44 + k, word_t'(bv[k]));
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (halted);
      @(negedge clk);
      host_addr = 6'd48;
      #1;
      checks++;
      if (host_rdata != word_t'(acc) || cycles != 16'd19) begin
        failures++;
        $display("FAIL dot product %h, expected %h; %0d cycles, expected 19",
                 host_rdata, word_t'(acc), cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
