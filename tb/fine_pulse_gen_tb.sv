// Testbench for fine_pulse_gen, driven by a real DLL locked to a 50 ns
// pixel clock. Coarse pulses are made here on the pixel grid; tap indices
// are computed here from the locked length N (tap = 95 - N + D, D = 0 uses
// tap 95). Output edges are timed against the pixel edges:
//  wide pulses with rise phase before and after fall phase (OR / AND),
//  single-pixel short pulses (fix), and a held coarse level in fix mode
//  that must give one short pulse per pixel.
`timescale 1ns/1ps
module fine_pulse_gen_tb;
  localparam real U = 0.62;
  localparam real T = 50.0;
  logic pclk = 0, clkrefby2 = 0, rst_n = 0, frst_n = 0;
  logic [95:0] taps;
  logic [6:0] count;
  logic up, lock;
  logic [6:0] tap_r = 95, tap_f = 95;
  logic r_after_f = 0, fix = 0, coarse = 0, fine;
  int checks = 0, failures = 0;
  int n_rise = 0;
  realtime last_rise, last_fall;

  dll u_dll (.ref_clk(pclk), .clkrefby2(clkrefby2), .rst_n(rst_n), .taps(taps),
             .count(count), .up(up), .lock(lock));
  fine_pulse_gen dut (.taps(taps), .rst_n(frst_n), .tap_r(tap_r), .tap_f(tap_f),
                      .r_after_f(r_after_f), .fix(fix), .coarse(coarse), .fine(fine));

  always #(T/2) pclk = ~pclk;
  always @(posedge pclk) clkrefby2 <= ~clkrefby2;
  always @(posedge fine) begin last_rise = $realtime; n_rise++; end
  always @(negedge fine) last_fall = $realtime;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real lag(input int d);   // delay of phase step d
    return (d == 0) ? count * U - T : d * U;
  endfunction

  function automatic logic [6:0] tap_of(input int d);
    return 7'(95 - count + ((d == 0) ? count : d));
  endfunction

  // coarse pulse of `w` pixels starting at the next pixel edge; returns its start time
  task automatic pulse(input int w, output realtime t_start);
    @(posedge pclk); coarse <= 1'b1; t_start = $realtime;
    repeat (w) @(posedge pclk);
    coarse <= 1'b0;
    repeat (4) @(posedge pclk);
  endtask

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    realtime ts;
    repeat (3) @(posedge clkrefby2);
    rst_n = 1;
    wait (lock);
    repeat (4) @(posedge pclk);
    frst_n = 1;
    repeat (4) @(posedge pclk);
    for (int it = 0; it < 24; it++) begin
      automatic int dr = $urandom_range(0, count - 1);
      automatic int df = $urandom_range(0, count - 1);
      automatic int w  = $urandom_range(2, 4);
      automatic bit short_p = (it % 3 == 2);
      if (short_p) begin
        if (dr == df) df = (dr + 7) % count;
        if (dr > df) begin automatic int t = dr; dr = df; df = t; end
        if (dr == 0) dr = 1;   // keep the rise strictly inside the pixel
        if (df <= dr) df = dr + 1;
        w = 1;
      end
      tap_r = tap_of(dr); tap_f = tap_of(df);
      r_after_f = (dr >= df); fix = short_p;
      repeat (3) @(posedge pclk);
      pulse(w, ts);
      begin
        automatic real er = ts + lag(dr);
        automatic real ef = short_p ? ts + lag(df) : ts + w * T + lag(df);
        chk(last_rise > er - 0.01 && last_rise < er + 0.01,
            $sformatf("it %0d rise %0.3f exp %0.3f (dr %0d df %0d w %0d)", it, last_rise, er, dr, df, w));
        chk(last_fall > ef - 0.01 && last_fall < ef + 0.01,
            $sformatf("it %0d fall %0.3f exp %0.3f (dr %0d df %0d w %0d)", it, last_fall, ef, dr, df, w));
      end
    end
    // fix mode with the coarse level held: one pulse per pixel
    tap_r = tap_of(10); tap_f = tap_of(40); r_after_f = 0; fix = 1;
    repeat (3) @(posedge pclk);
    begin
      automatic int n0 = n_rise;
      pulse(6, ts);
      chk(n_rise - n0 == 6, $sformatf("held coarse gives %0d pulses, exp 6", n_rise - n0));
      chk(last_fall - last_rise > 30 * U - 0.01 && last_fall - last_rise < 30 * U + 0.01, "pixel-rate pulse width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
