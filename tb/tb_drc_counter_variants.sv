// tb_drc_counter_variants: the other gating arrangements and a six-stage
// counter.
//
//   u4  : 4 stages, GATING_4 (complement on the down copy). After each dn the
//         false rank must read T+1 (reference column below); after each up
//         T = F.
//   u5  : 4 stages, GATING_5 (ranks' roles interchanged). A number is gated
//         into the true rank and counting starts with dn; after each dn
//         F = ~T, after each up T has advanced by one; carry_out is high
//         during an up exactly when the true rank is all 1s.
//   umx : 6 stages, GATING_MIXED with stages 0, 3 and 5 complemented on up
//         and the others on down: the true rank must still count, and the
//         false rank must hold ~T in the first group and T in the second.
//   u6  : 6 stages, GATING_3, counted through more than a full cycle.
module tb_drc_counter_variants;
  import drc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic up, dn, load;
  logic [5:0] preset;

  always #5 clk = ~clk;

  logic [3:0] t4, f4, t5, f5;
  logic [5:0] tm, fm, t6, f6;
  logic c4, c5, cm, c6;

  localparam logic [5:0] MIX = 6'b101001;

  drc_counter #(.N(4), .GATING(GATING_4)) u4 (
    .clk, .rst_n, .up, .dn, .load, .preset(preset[3:0]),
    .true_rank(t4), .false_rank(f4), .carry_out(c4));
  drc_counter #(.N(4), .GATING(GATING_5)) u5 (
    .clk, .rst_n, .up, .dn, .load, .preset(preset[3:0]),
    .true_rank(t5), .false_rank(f5), .carry_out(c5));
  drc_counter #(.N(6), .GATING(GATING_MIXED), .MIXED_UP_CPL(MIX)) umx (
    .clk, .rst_n, .up, .dn, .load, .preset,
    .true_rank(tm), .false_rank(fm), .carry_out(cm));
  drc_counter #(.N(6), .GATING(GATING_3)) u6 (
    .clk, .rst_n, .up, .dn, .load(1'b0), .preset,
    .true_rank(t6), .false_rank(f6), .carry_out(c6));

  // False rank just after the down pulse, true rank 0..15, GATING_4.
  localparam logic [3:0] TAB_F4 [16] = '{
    4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1000,
    4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111, 4'b0000};

  int checks = 0;
  int failures = 0;
  int n_wrap4 = 0, n_wrap5 = 0, n_wrap6 = 0, n_load5 = 0, n_loadm = 0;

  task automatic check(input string what, input logic [5:0] got, input logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  logic s4, s5, s6;  // carry_out sampled during the gated pulse
  always @(posedge clk) begin
    if (dn) begin s4 <= c4; s6 <= c6; end
    if (up) s5 <= c5;
  end

  task automatic check4(input string what, input logic [3:0] got, input logic [3:0] exp);
    check(what, {2'b00, got}, {2'b00, exp});
  endtask

  task automatic pulse(input bit is_dn);
    @(negedge clk);
    dn = is_dn; up = !is_dn;
    @(negedge clk);
    dn = 0; up = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] t4b, t5b;
    logic [5:0] tmb, t6b, exp_m;
    up = 0; dn = 0; load = 0; preset = '0;
    s4 = 0; s5 = 0; s6 = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    check("u4 reset F", 6'(f4), 6'b0000);
    check("u5 reset F", 6'(f5), 6'b1111);
    check("umx reset F", fm, MIX);
    check("u6 reset F", f6, 6'b111111);
    rst_n = 1;

    // Common count of 70 (dn, up) pairs from reset. u5 is checked with the
    // same pulses: it is reset to 0 and its count is made on up.
    for (int k = 0; k < 70; k++) begin
      t4b = t4; t5b = t5; tmb = tm; t6b = t6;
      pulse(1);
      check4("u4 T after dn", t4, t4b);
      check4("u4 F after dn", f4, TAB_F4[k % 16]);
      check4("u5 F after dn", f5, ~t5b);
      check("u6 T after dn", t6, t6b);
      checks++;
      if (s4 !== (t4b == 4'hF) || s6 !== (t6b == 6'h3F)) begin
        failures++; $display("FAIL carry_out u4=%b u6=%b", s4, s6);
      end
      if (s4) n_wrap4++;
      if (s6) n_wrap6++;
      pulse(0);
      check4("u4 T after up", t4, 4'(unsigned'(k + 1)));
      check4("u4 F = T after up", f4, t4);
      check4("u5 T after up", t5, 4'(unsigned'(k + 1)));
      checks++;
      if (s5 !== (t5b == 4'hF)) begin failures++; $display("FAIL u5 carry_out"); end
      if (s5) n_wrap5++;
      exp_m = 6'(unsigned'(k + 1));
      check("umx T after up", tm, exp_m);
      check("umx F after up", fm, (exp_m & ~MIX) | (~exp_m & MIX));
      check("u6 T after up", t6, 6'(unsigned'(k + 1)));
      check("u6 F after up", f6, ~6'(unsigned'(k + 1)));
    end

    // Predetermined start. u5: number into the true rank, start with dn.
    // umx: number plus one into the false rank in each stage's form, start
    // with up.
    @(negedge clk);
    load = 1; preset = 6'd45;
    @(negedge clk);
    load = 0;
    n_load5++; n_loadm++;
    check4("u5 T after load", t5, 4'd13);
    check("umx F after load", fm, (6'd45 & ~MIX) | (~6'd45 & MIX));
    check4("u4 F after load", f4, 4'd13);
    pulse(0);  // umx and u4 start with up
    check("umx T from preset", tm, 6'd45);
    check4("u4 T from preset", t4, 4'd13);
    // u5 needs dn first: restart it cleanly.
    @(negedge clk);
    load = 1; preset = 6'd13;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < 5; k++) begin
      pulse(1);
      check4("u5 F = ~T", f5, ~4'(unsigned'(13 + k)));
      pulse(0);
      check4("u5 counts from preset", t5, 4'(unsigned'(14 + k)));
    end

    checks++; if (n_wrap4 == 0) begin failures++; $display("FAIL u4 never wrapped"); end
    checks++; if (n_wrap5 == 0) begin failures++; $display("FAIL u5 never wrapped"); end
    checks++; if (n_wrap6 == 0) begin failures++; $display("FAIL u6 never wrapped"); end
    checks++; if (n_load5 == 0 || n_loadm == 0) begin failures++; $display("FAIL no load"); end
    $display("events: wrap4=%0d wrap5=%0d wrap6=%0d loads=%0d", n_wrap4, n_wrap5, n_wrap6, n_load5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
