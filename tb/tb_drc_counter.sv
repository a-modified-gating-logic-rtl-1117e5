// tb_drc_counter: end-to-end test of the double rank counter at its default
// size (four stages, main gating arrangement).
//
// 1. Counting sequence: from reset, 40 counts of (dn, up). After every dn
//    the two ranks must read as in the reference table below (true rank
//    unchanged, false rank = ~(T+1)); after every up the true rank must have
//    advanced by exactly one and the false rank must hold its complement.
//    carry_out must be high during a dn exactly when the true rank is all 1s.
// 2. Preset: loading P+1 and starting with up, and loading P followed by one
//    external (dn, up) cycle, must both leave the true rank at P+1.
// 3. Random pulse trains (dn and up in any order, gaps, loads) against a
//    behavioural model written from the transfer rules.
// Mechanisms counted, each of which must occur: carry chain reaching the
// top stage, wrap-around (carry_out), preset load, false rank counting
// down, a dn that leaves the low stage as the only one to change.
module tb_drc_counter;
  import drc_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic up, dn, load;
  logic [N-1:0] preset;
  logic [N-1:0] true_rank, false_rank;
  logic carry_out;

  always #5 clk = ~clk;

  // Default parameters: the full-size configuration.
  drc_counter dut (
    .clk, .rst_n, .up, .dn, .load, .preset,
    .true_rank, .false_rank, .carry_out
  );

  // Readings of (true rank, false rank) just after the down pulse, for
  // true rank 0..15, complemented-up / direct-down gating.
  localparam logic [3:0] TAB_T [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111,
    4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111};
  localparam logic [3:0] TAB_F [16] = '{
    4'b1110, 4'b1101, 4'b1100, 4'b1011, 4'b1010, 4'b1001, 4'b1000, 4'b0111,
    4'b0110, 4'b0101, 4'b0100, 4'b0011, 4'b0010, 4'b0001, 4'b0000, 4'b1111};

  int checks = 0;
  int failures = 0;
  int n_top_carry = 0, n_wrap = 0, n_load = 0, n_down_count = 0, n_short_carry = 0;

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // One pulse of one clock cycle; inputs change away from the active edge.
  task automatic pulse(input bit is_dn);
    @(negedge clk);
    dn = is_dn; up = !is_dn;
    @(negedge clk);
    dn = 0; up = 0;
  endtask

  task automatic do_load(input logic [N-1:0] v);
    @(negedge clk);
    load = 1; preset = v;
    @(negedge clk);
    load = 0;
    n_load++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry_out is sampled while dn is high.
  logic saw_carry;
  always @(posedge clk) if (dn) saw_carry <= carry_out;

  initial begin
    logic [N-1:0] t_before, f_before, exp_t, f_prev_up;
    up = 0; dn = 0; load = 0; preset = '0; saw_carry = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    check("reset true", true_rank, 4'b0000);
    check("reset false", false_rank, 4'b1111);
    rst_n = 1;
    f_prev_up = false_rank;

    // ---- 1. counting sequence ----
    for (int k = 0; k < 40; k++) begin
      t_before = true_rank;
      f_before = false_rank;
      pulse(1);
      check("T after dn (unchanged)", true_rank, t_before);
      check("T matches table", true_rank, TAB_T[k % 16]);
      check("F after dn", false_rank, TAB_F[k % 16]);
      checks++;
      if (saw_carry !== (t_before == 4'b1111)) begin
        failures++;
        $display("FAIL carry_out=%b with T=%b", saw_carry, t_before);
      end
      if (saw_carry) n_wrap++;
      // Full carry chain: the top stage's false flip-flop was switched.
      if (false_rank[N-1] != f_before[N-1]) n_top_carry++;
      if ((false_rank ^ f_before) == 4'b0001) n_short_carry++;
      f_before = false_rank;
      pulse(0);
      exp_t = 4'(k + 1);
      check("T after up (+1)", true_rank, exp_t);
      check("F = ~T after up", false_rank, ~exp_t);
      // Between counts the false rank steps down by one.
      if (k > 0 && false_rank == 4'(f_prev_up - 4'd1)) n_down_count++;
      f_prev_up = false_rank;
    end

    // ---- 2. preset ----
    // Start at P = 9: gate P+1 into the false rank in complement form, then up.
    do_load(4'd10);
    check("F after load", false_rank, ~4'd10);
    pulse(0);
    check("T after load+up", true_rank, 4'd10);
    pulse(1); pulse(0);
    check("T counts on from preset", true_rank, 4'd11);
    // Same start by gating P itself and one external (dn, up) cycle.
    do_load(4'd9);
    pulse(0);
    check("T after load P+up", true_rank, 4'd9);
    pulse(1); pulse(0);
    check("T after external cycle", true_rank, 4'd10);
    // Preset of all ones counts through the wrap.
    do_load(4'd15);
    pulse(0);
    pulse(1);
    checks++;
    if (!saw_carry) begin failures++; $display("FAIL no carry_out from preset 15"); end
    else n_wrap++;
    pulse(0);
    check("wrap after preset", true_rank, 4'd0);

    // ---- 3. random pulse trains against a rule-level model ----
    begin
      logic [N-1:0] mt, mf;
      mt = true_rank; mf = false_rank;
      for (int c = 0; c < 3000; c++) begin
        int r;
        logic cy;
        @(negedge clk);
        r = $urandom_range(0, 9);
        dn = (r < 4); up = (r >= 4 && r < 8); load = (r == 8);
        preset = N'($urandom);
        #1;
        if (load) begin
          mf = ~preset;
        end else if (up) begin
          mt = ~mf;
        end else if (dn) begin
          cy = 1'b1;
          checks++;
          if (carry_out !== &mt) begin failures++; $display("FAIL random carry_out"); end
          for (int i = 0; i < N; i++) begin
            if (cy) mf[i] = mt[i];
            cy = cy & mt[i];
          end
        end
        @(posedge clk); #1;
        check("random T", true_rank, mt);
        check("random F", false_rank, mf);
      end
      @(negedge clk);
      dn = 0; up = 0; load = 0;
    end

    checks++; if (n_top_carry   == 0) begin failures++; $display("FAIL carry never reached the top stage alone"); end
    checks++; if (n_wrap        == 0) begin failures++; $display("FAIL counter never wrapped"); end
    checks++; if (n_load        == 0) begin failures++; $display("FAIL no preset load"); end
    checks++; if (n_down_count  == 0) begin failures++; $display("FAIL false rank never counted down"); end
    checks++; if (n_short_carry == 0) begin failures++; $display("FAIL carry never stopped at stage 0"); end
    $display("events: top_carry=%0d wrap=%0d load=%0d false_down=%0d stage0_only=%0d",
             n_top_carry, n_wrap, n_load, n_down_count, n_short_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
