// tb_drc_stage: self-checking test of one double rank counter digit stage.
//
// Three stages, one per transfer mode, share random stimulus (par_pulse,
// carry_in, loads, preset_bit). The testbench keeps its own copy of each
// stage's two flip-flops, updated from the transfer rules written out
// below, and compares t_q, f_q and the combinational carry_out every cycle.
// It also checks the reset values and that each kind of event (parallel
// transfer, gated transfer, carry passed, carry blocked, load) occurred.
module tb_drc_stage;
  import drc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic par_pulse, carry_in, load_t, load_f, preset_bit;
  logic [2:0] t_q, f_q, carry_out;

  int checks = 0;
  int failures = 0;
  int n_par = 0, n_gated = 0, n_pass = 0, n_block = 0, n_load = 0;

  always #5 clk = ~clk;

  drc_stage #(.MODE(STAGE_UP_CPL)) u_up (
    .clk, .rst_n, .par_pulse, .carry_in, .carry_out(carry_out[0]),
    .load_t, .load_f, .preset_bit, .t_q(t_q[0]), .f_q(f_q[0]));
  drc_stage #(.MODE(STAGE_DN_CPL)) u_dn (
    .clk, .rst_n, .par_pulse, .carry_in, .carry_out(carry_out[1]),
    .load_t, .load_f, .preset_bit, .t_q(t_q[1]), .f_q(f_q[1]));
  drc_stage #(.MODE(STAGE_SWAP)) u_sw (
    .clk, .rst_n, .par_pulse, .carry_in, .carry_out(carry_out[2]),
    .load_t, .load_f, .preset_bit, .t_q(t_q[2]), .f_q(f_q[2]));

  // Reference state.
  logic [2:0] rt, rf;

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    par_pulse = 0; carry_in = 0; load_t = 0; load_f = 0; preset_bit = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    // Reset: T = 0 everywhere; F = 1, 0, 1 (as after an up pulse).
    check("reset t", t_q, 3'b000);
    check("reset f", f_q, 3'b101);
    rt = 3'b000; rf = 3'b101;
    rst_n = 1;

    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      par_pulse  = ($urandom_range(0, 2) == 0);
      carry_in   = ($urandom_range(0, 2) == 0);
      load_t     = ($urandom_range(0, 15) == 0);
      load_f     = ($urandom_range(0, 15) == 0);
      preset_bit = 1'($urandom);
      #1;
      // Combinational carry gate.
      check("carry_out", carry_out,
            {carry_in & ~rf[2], carry_in & rt[1], carry_in & rt[0]});
      if (carry_in &&  rt[0]) n_pass++;
      if (carry_in && !rt[0]) n_block++;
      // Next state from the transfer rules.
      begin
        logic [2:0] nt, nf;
        nt = rt; nf = rf;
        // Complemented-up stage: up F -c-> T, gated down T -d-> F.
        if (par_pulse) nt[0] = ~rf[0];
        if (carry_in)  nf[0] =  rt[0];
        // Complemented-down stage: up F -d-> T, gated down T -c-> F.
        if (par_pulse) nt[1] =  rf[1];
        if (carry_in)  nf[1] = ~rt[1];
        // Swapped stage: down T -c-> F in parallel, gated up F -d-> T.
        if (par_pulse) nf[2] = ~rt[2];
        if (carry_in)  nt[2] =  rf[2];
        if (load_t) nt = {3{preset_bit}};
        if (load_f) nf = {3{preset_bit}};
        rt = nt; rf = nf;
      end
      if (par_pulse) n_par++;
      if (carry_in)  n_gated++;
      if (load_t || load_f) n_load++;
      @(posedge clk);
      #1;
      check("t_q", t_q, rt);
      check("f_q", f_q, rf);
    end

    checks++; if (n_par   == 0) begin failures++; $display("FAIL no parallel transfer"); end
    checks++; if (n_gated == 0) begin failures++; $display("FAIL no gated transfer"); end
    checks++; if (n_pass  == 0) begin failures++; $display("FAIL carry never passed"); end
    checks++; if (n_block == 0) begin failures++; $display("FAIL carry never blocked"); end
    checks++; if (n_load  == 0) begin failures++; $display("FAIL no load"); end
    $display("events: parallel=%0d gated=%0d pass=%0d block=%0d load=%0d",
             n_par, n_gated, n_pass, n_block, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
