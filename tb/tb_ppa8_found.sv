// tb_ppa8_found: exhaustive self-checking test of all eighteen 8-bit search-result adders.
//
// One ppa8_found is built for every value of ppa_pkg::ppa8_e. Every operand pair and carry
// input (2^17 cases) is applied to all of them at once and each {cout, s} is compared with
// the integer sum. The shape of each prefix network is checked against the structure's
// published label: the node count (the second number of a (fanout, nodes) label) and the
// depth for every structure, a largest fanout of 1 for the (1, 11) structures, and the total
// horizontal wire length (area*power divided by nodes) and the branch effort of the worst
// path from bit 0 (from the delay) for those labelled with (delay, area*power).
// A watchdog ends the run if it stalls.
module tb_ppa8_found;
  localparam int K = ppa_pkg::PPA8_COUNT;
  // expected shape per structure, in ppa8_e order; -1 means "not published"
  localparam int EXP_NODES  [K] = '{14, 14, 13, 13, 13, 15, 15, 15, 12,
                                    11, 11, 11, 11, 11, 11, 10, 15, 13};
  localparam int EXP_LEVELS [K] = '{3, 3, 3, 3, 3, 3, 3, 3, 3,
                                    4, 4, 4, 4, 4, 4, 4, 4, 4};
  localparam int EXP_FANOUT [K] = '{-1, -1, -1, -1, -1, -1, -1, -1, -1,
                                     1, 1, 1, 1, 1, 1, -1, -1, -1};
  // (7.56,299)/13 = 23, (6.87,405)/15 = 27, (8.14,240)/12 = 20, (8.00,176)/11 = 16,
  // (8.85,130)/10 = 13, (6.73,405)/15 = 27. The (7.44,286) structure is drawn with a wire
  // length of 21 against the 22 its label implies, so it is left unchecked.
  localparam int EXP_WIRE   [K] = '{-1, -1, -1, 23, -1, -1, 27, -1, 20,
                                    -1, -1, 16, -1, -1, -1, 13, 27, -1};

  // Branch effort on the worst path from bit 0, from the delay labels:
  // delay = levels * effort^(1/levels), so (7.56 -> 16), (6.87 -> 12), (8.14 -> 20),
  // (8.00 -> 16), (8.85 -> 24), (6.73 -> 8), (7.44 -> 12).
  localparam int EXP_EFFORT [K] = '{-1, -1, -1, 16, -1, -1, 12, -1, 20,
                                    -1, -1, 16, -1, -1, -1, 24, 8, 12};

  logic [7:0] a, b;
  logic       cin;
  logic [7:0] s    [K];
  logic       cout [K];
  int checks = 0, failures = 0;

  task automatic expect_shape(input int k, input int ok, input int nodes, input int levels,
                              input int fanout, input int wlen, input int effort);
    checks++;
    if (ok != 1 || nodes != EXP_NODES[k] || levels != EXP_LEVELS[k] ||
        (EXP_FANOUT[k] >= 0 && fanout != EXP_FANOUT[k]) ||
        (EXP_WIRE[k] >= 0 && wlen != EXP_WIRE[k]) ||
        (EXP_EFFORT[k] >= 0 && effort != EXP_EFFORT[k])) begin
      failures++;
      $display({"FAIL shape of structure %0d: ok=%0d nodes=%0d levels=%0d fanout=%0d",
                " wire=%0d effort=%0d"},
               k, ok, nodes, levels, fanout, wlen, effort);
    end
  endtask

  for (genvar k = 0; k < K; k++) begin : g_dut
    ppa8_found #(.SEL(ppa_pkg::ppa8_e'(k))) u (
      .a(a), .b(b), .cin(cin), .s(s[k]), .cout(cout[k]));
    if (k < int'(ppa_pkg::PPA8_THREE_LEVEL)) begin : g_chk3
      initial expect_shape(k, int'(u.g_three.u_adder.u_net.STRUCT_OK),
                           u.g_three.u_adder.u_net.NODES, u.g_three.u_adder.u_net.LEVELS,
                           u.g_three.u_adder.u_net.MAX_FANOUT,
                           u.g_three.u_adder.u_net.WIRE_LENGTH,
                           u.g_three.u_adder.u_net.BRANCH_EFFORT);
    end else begin : g_chk4
      initial expect_shape(k, int'(u.g_four.u_adder.u_net.STRUCT_OK),
                           u.g_four.u_adder.u_net.NODES, u.g_four.u_adder.u_net.LEVELS,
                           u.g_four.u_adder.u_net.MAX_FANOUT,
                           u.g_four.u_adder.u_net.WIRE_LENGTH,
                           u.g_four.u_adder.u_net.BRANCH_EFFORT);
    end
  end

  initial begin
    #1;
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] exp;
      {cin, a, b} = 17'(v);
      #1;
      exp = {1'b0, a} + {1'b0, b} + {8'b0, cin};
      for (int k = 0; k < K; k++) begin
        checks++;
        if ({cout[k], s[k]} !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL structure %0d a=%h b=%h cin=%b got %b_%h expected %h",
                     k, a, b, cin, cout[k], s[k], exp);
        end
      end
    end
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
