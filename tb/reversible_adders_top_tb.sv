// End-to-end testbench for reversible_adders_top at its default parameters.
//
// Both adders are driven at once with different operands: the carry skip
// adder walks through every (x, y, cin) combination in order, while the
// carry select adder receives a scrambled combination in the same cycle,
// so a swapped or shared connection between the two shows up as an error.
// Every sum and carry out is compared with integer addition.
//
// It counts each mechanism of the design and fails if one never happens:
//   - carry skip adder: carry out taken through the bypass (all bits
//     propagate) and through the ripple chain, including ripple cases with
//     a carry out of 1;
//   - carry select adder: carry-in-0 chain selected, carry-in-1 chain
//     selected, and cases where the two chains' carries out differ.
// A watchdog ends the run after a fixed number of clock cycles.
module reversible_adders_top_tb;
  localparam int unsigned W = rev_adder_pkg::ADDER_WIDTH;
  localparam int unsigned N = 1 << (2 * W + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] skip_x, skip_y, skip_sum;
  logic         skip_cin, skip_cout, skip_bypass;
  logic [W-1:0] sel_x, sel_y, sel_sum;
  logic         sel_cin, sel_cout;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_ripple = 0, n_ripple_carry = 0;
  int n_sel0 = 0, n_sel1 = 0, n_sel_differs = 0;

  reversible_adders_top dut (
    .skip_x, .skip_y, .skip_cin, .skip_sum, .skip_cout, .skip_bypass,
    .sel_x, .sel_y, .sel_cin, .sel_sum, .sel_cout
  );

  initial begin
    repeat (20 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(N); k++) begin
      int unsigned ks, kc;
      int sk_total, se_total;
      ks = k;
      // odd multiplier: a permutation of 0..N-1, different from ks
      kc = (k * 37 + 11) % N;
      {skip_cin, skip_x, skip_y} = (2*W+1)'(ks);
      {sel_cin,  sel_x,  sel_y}  = (2*W+1)'(kc);
      @(posedge clk);
      sk_total = int'(skip_x) + int'(skip_y) + int'(skip_cin);
      se_total = int'(sel_x)  + int'(sel_y)  + int'(sel_cin);

      checks++;
      if ({skip_cout, skip_sum} !== (W+1)'(sk_total)) begin
        failures++;
        $display("FAIL skip %0d + %0d + %0d: got cout=%b sum=%0d",
                 skip_x, skip_y, skip_cin, skip_cout, skip_sum);
      end
      checks++;
      if ({sel_cout, sel_sum} !== (W+1)'(se_total)) begin
        failures++;
        $display("FAIL select %0d + %0d + %0d: got cout=%b sum=%0d",
                 sel_x, sel_y, sel_cin, sel_cout, sel_sum);
      end
      checks++;
      if (skip_bypass !== ((skip_x ^ skip_y) == {W{1'b1}})) begin
        failures++;
        $display("FAIL skip_bypass=%b for x=%b y=%b", skip_bypass, skip_x, skip_y);
      end

      if (skip_bypass) n_bypass++;
      else begin
        n_ripple++;
        if (skip_cout) n_ripple_carry++;
      end
      if (sel_cin) n_sel1++; else n_sel0++;
      if (int'(sel_x) + int'(sel_y) == (1 << W) - 1) n_sel_differs++;
    end

    $display("skip adder: bypass %0d, ripple %0d (with carry out %0d)",
             n_bypass, n_ripple, n_ripple_carry);
    $display("select adder: chain 0 %0d, chain 1 %0d, chains' carries differ %0d",
             n_sel0, n_sel1, n_sel_differs);
    checks++;
    if (n_bypass == 0 || n_ripple == 0 || n_ripple_carry == 0) begin
      failures++;
      $display("FAIL a carry skip mechanism never happened");
    end
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0 || n_sel_differs == 0) begin
      failures++;
      $display("FAIL a carry select mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
