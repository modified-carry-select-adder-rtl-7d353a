// tb_modified_csa: end-to-end self-check of the 16-bit modified carry select
// adder at its default parameters.
//
// Drives directed corner cases and then pseudo-random operands and compares
// {cout, sum} with a + b + cin computed as a wider integer. The adder is
// combinational; each vector is applied and checked after a 1-unit settle.
//
// It also counts, from the operands alone, how often the carry select
// mechanism was exercised, and counts a failure for any that never happened:
//   - for each upper 4-bit group, selection of the carry-in-0 result and of
//     the carry-in-1 result (the carry entering the group is 0 resp. 1);
//   - a carry passed on by a group's carry mux unchanged because that group
//     propagates (its a + b = 15 and the carry entering it is 1);
//   - a carry-in travelling from bit 0 all the way to cout;
//   - carry out of the top bit.
module tb_modified_csa;
  import mcsa_pkg::*;

  localparam int unsigned W      = 16;
  localparam int unsigned GROUPS = W / BKA_BITS;
  localparam int          NRAND  = 200000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  int sel0  [GROUPS];
  int sel1  [GROUPS];
  int passed_through = 0, full_chain = 0, carry_out = 0;

  modified_csa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv,
                       input logic cv);
    longint unsigned exp, lo_a, lo_b, cin_k, grp;
    a = av; b = bv; cin = cv;
    #1;
    exp = longint'(av) + longint'(bv) + longint'(cv);
    checks++;
    if ({cout, sum} !== (W + 1)'(exp)) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h expected %0b_%h",
                 av, bv, cv, cout, sum, exp[W], exp[W-1:0]);
    end
    // mechanism coverage, derived from the operands only
    for (int k = 1; k < int'(GROUPS); k++) begin
      lo_a  = longint'(av) & ((64'd1 << (k * BKA_BITS)) - 1);
      lo_b  = longint'(bv) & ((64'd1 << (k * BKA_BITS)) - 1);
      cin_k = (lo_a + lo_b + longint'(cv)) >> (k * BKA_BITS);
      if (cin_k == 0) sel0[k]++; else sel1[k]++;
      grp = ((longint'(av) >> (k * BKA_BITS)) & 15) + ((longint'(bv) >> (k * BKA_BITS)) & 15);
      if (cin_k == 1 && grp == 15) passed_through++;
    end
    if (cv && (longint'(av) + longint'(bv) == (64'd1 << W) - 1)) full_chain++;
    if (exp[W]) carry_out++;
  endtask

  initial begin
    for (int k = 0; k < int'(GROUPS); k++) begin sel0[k] = 0; sel1[k] = 0; end

    // directed corners
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);            // carry-in ripples through every group
    apply('1, '1, 1'b1);
    apply('1, W'(1), 1'b0);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, 1'b1);
    apply({(W/2){2'b10}}, {(W/2){2'b01}}, 1'b0);
    for (int k = 0; k < int'(GROUPS); k++) begin
      // one group propagates, everything below it generates
      apply(W'(((64'd1 << BKA_BITS) - 1) << (k * BKA_BITS)) | W'((64'd1 << (k * BKA_BITS)) - 1),
            W'((64'd1 << (k * BKA_BITS)) - 1) | W'(0), 1'b0);
      apply(W'(64'hF << (k * BKA_BITS)), W'(0), 1'b1);
    end

    // pseudo-random operands
    for (int n = 0; n < NRAND; n++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      // every 8th vector, make b complement a so long carry chains appear
      if (n % 8 == 7) rb = ~ra;
      apply(ra, rb, 1'($urandom));
    end

    for (int k = 1; k < int'(GROUPS); k++) begin
      $display("group %0d: selected cin=0 result %0d times, cin=1 result %0d times",
               k, sel0[k], sel1[k]);
      checks += 2;
      if (sel0[k] == 0) begin failures++; $display("FAIL group %0d never chose cin=0", k); end
      if (sel1[k] == 0) begin failures++; $display("FAIL group %0d never chose cin=1", k); end
    end
    $display("carry passed through a propagating group: %0d", passed_through);
    $display("carry-in rippled to cout: %0d", full_chain);
    $display("carry out of top bit: %0d", carry_out);
    checks += 3;
    if (passed_through == 0) begin failures++; $display("FAIL no pass-through carry"); end
    if (full_chain == 0)     begin failures++; $display("FAIL no full carry chain"); end
    if (carry_out == 0)      begin failures++; $display("FAIL no carry out"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
