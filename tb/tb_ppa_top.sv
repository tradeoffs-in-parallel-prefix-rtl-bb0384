// tb_ppa_top: end-to-end self-checking test of the whole set of adders, at its defaults.
//
// Drives the 16-bit and the 8-bit operand pairs of ppa_top with directed and random values
// and compares every adder's {cout, s} with the integer sum. It counts how often each carry
// mechanism of a prefix adder was exercised, separately for the 16-bit and 8-bit sides:
//   propagate_all  every column propagates and the carry input ripples to cout (p_{N-1:0}=1)
//   gen_lsb_to_msb a carry generated in column 0 travels through every other column to cout
//   carry_kill     the carry input is 1 but a column kills it (no carry out, cin absorbed)
//   msb_generate   the carry out is generated in the top column itself
// A mechanism that never happened counts as a failure. A watchdog ends the run if it stalls.
module tb_ppa_top;
  localparam int K = ppa_pkg::PPA8_COUNT;

  logic [15:0] a16, b16;
  logic        cin16;
  logic [15:0] s16 [5];
  logic        c16 [5];
  logic [7:0]  a8, b8;
  logic        cin8;
  logic [K-1:0][7:0] sum8;
  logic [K-1:0]      cout8;

  int checks = 0, failures = 0;
  int n16_prop = 0, n16_gen = 0, n16_kill = 0, n16_msb = 0;
  int n8_prop = 0, n8_gen = 0, n8_kill = 0, n8_msb = 0;

  ppa_top dut (
    .a16(a16), .b16(b16), .cin16(cin16),
    .sum_struct_a(s16[0]), .cout_struct_a(c16[0]),
    .sum_mod_a(s16[1]),    .cout_mod_a(c16[1]),
    .sum_struct_c(s16[2]), .cout_struct_c(c16[2]),
    .sum_struct_d(s16[3]), .cout_struct_d(c16[3]),
    .sum_mod_lf(s16[4]),   .cout_mod_lf(c16[4]),
    .a8(a8), .b8(b8), .cin8(cin8), .sum8(sum8), .cout8(cout8)
  );

  task automatic apply(input logic [15:0] x16, input logic [15:0] y16, input logic c16i,
                       input logic [7:0] x8, input logic [7:0] y8, input logic c8i);
    logic [16:0] e16;
    logic [8:0]  e8;
    a16 = x16; b16 = y16; cin16 = c16i;
    a8 = x8;   b8 = y8;   cin8 = c8i;
    #1;
    e16 = {1'b0, x16} + {1'b0, y16} + {16'b0, c16i};
    e8  = {1'b0, x8} + {1'b0, y8} + {8'b0, c8i};
    for (int k = 0; k < 5; k++) begin
      checks++;
      if ({c16[k], s16[k]} !== e16) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit adder %0d a=%h b=%h cin=%b", k, x16, y16, c16i);
      end
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if ({cout8[k], sum8[k]} !== e8) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit adder %0d a=%h b=%h cin=%b", k, x8, y8, c8i);
      end
    end
    // mechanism counters, from the operands alone
    if ((x16 ^ y16) == 16'hFFFF && c16i) n16_prop++;
    if ((x16[0] & y16[0]) && (x16[15:1] ^ y16[15:1]) == 15'h7FFF) n16_gen++;
    if (c16i && !e16[16] && (x16 ^ y16) != 16'hFFFF) n16_kill++;
    if (x16[15] & y16[15]) n16_msb++;
    if ((x8 ^ y8) == 8'hFF && c8i) n8_prop++;
    if ((x8[0] & y8[0]) && (x8[7:1] ^ y8[7:1]) == 7'h7F) n8_gen++;
    if (c8i && !e8[8] && (x8 ^ y8) != 8'hFF) n8_kill++;
    if (x8[7] & y8[7]) n8_msb++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-22s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    apply(16'h0000, 16'h0000, 1'b0, 8'h00, 8'h00, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1, 8'hFF, 8'h00, 1'b1);   // full-width propagate
    apply(16'h5555, 16'hAAAA, 1'b1, 8'h55, 8'hAA, 1'b1);
    apply(16'hFFFF, 16'h0001, 1'b0, 8'hFF, 8'h01, 1'b0);   // bit-0 generate runs to cout
    apply(16'h8001, 16'hFFFF, 1'b0, 8'h81, 8'hFF, 1'b0);
    apply(16'h8000, 16'h8000, 1'b1, 8'h80, 8'h80, 1'b1);   // top column generates
    apply(16'h7FFE, 16'h0000, 1'b1, 8'h7E, 8'h00, 1'b1);   // carry-in killed at bit 0
    for (int k = 0; k < 16; k++)
      apply(16'hFFFF << k, 16'h0001 << k, 1'b0, 8'hFF << (k % 8), 8'h01 << (k % 8), 1'b0);
    for (int t = 0; t < 50000; t++)
      apply(16'($urandom), 16'($urandom), 1'($urandom), 8'($urandom), 8'($urandom), 1'($urandom));
    need("16-bit propagate_all", n16_prop);
    need("16-bit gen_lsb_to_msb", n16_gen);
    need("16-bit carry_kill", n16_kill);
    need("16-bit msb_generate", n16_msb);
    need("8-bit propagate_all", n8_prop);
    need("8-bit gen_lsb_to_msb", n8_gen);
    need("8-bit carry_kill", n8_kill);
    need("8-bit msb_generate", n8_msb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
