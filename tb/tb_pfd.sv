// tb_pfd: checks the phase/frequency detector.
//
// Equal frequencies (50 ns period): for divider lags of 5% .. 95% of a period,
// the measured duty cycle of phi must equal the lag within 1 ns, and phi_b
// must be its complement. Around the lock point (lag 50%), the lag is then
// stepped by 0.1 ns from 48.2% to 51.8% of the period. Here the high time of phi
// is measured exactly from its edges. Each point must give duty = lag within
// 0.05 ns per period and must rise above the previous one. That is, the
// detector has no dead zone: every phase step, however small, changes the
// output. Frequency error: with the divider 10% slower than
// the reference, the average duty cycle must exceed 80%; with it 10% faster,
// it must stay below 20%. The testbench counts how often the detector
// saturated (phi held through an edge of the other input).
`timescale 1ns/1ps
module tb_pfd;

  logic ref_in = 1'b0, div_in = 1'b0;
  logic rst_n = 1'b1;
  logic phi, phi_b;

  pfd dut (.ref_in, .div_in, .rst_n, .phi, .phi_b);

  int checks = 0;
  int failures = 0;
  int n_sat_high = 0, n_sat_low = 0;

  // Duty measurement with 0.1 ns resolution.
  longint t_high = 0, t_total = 0;
  bit measuring = 1'b0;
  always #0.1 begin
    if (measuring) begin
      t_total++;
      if (phi) t_high++;
      if (phi_b === phi) begin
        failures++;
        checks++;
      end
    end
  end
  // Exact high time, integrated on phi's edges.
  realtime t_rise = 0.0, t_start = 0.0;
  real     hi_exact = 0.0;
  bit      exact_on = 1'b0;
  always @(phi) begin
    if (exact_on) begin
      if (phi) t_rise = $realtime;
      else     hi_exact += $realtime - t_rise;
    end
  end

  always @(posedge div_in) if (phi) n_sat_high++;
  always @(posedge ref_in) if (!phi) n_sat_low++;

  task automatic reset_dut();
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
  endtask

  initial begin : run
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    // Phase sweep: both clocks restart together for each lag. The reference
    // rises 25 ns after the start, the divider lag*50 ns later, with the same
    // 50 ns period.
    for (int p = 1; p < 20; p++) begin
      real lag;
      lag = real'(p) * 0.05;
      fork
        begin : clocks
          fork
            forever begin
              #25 ref_in = 1'b1;
              #25 ref_in = 1'b0;
            end
            begin
              #(25.0 + lag * 50.0);
              forever begin
                div_in = 1'b1;
                #25 div_in = 1'b0;
                #25;
              end
            end
          join
        end
        begin : measure
          #1 reset_dut();
          #(20 * 50);
          t_high = 0; t_total = 0; measuring = 1'b1;
          #(40 * 50);
          measuring = 1'b0;
          checks++;
          if ((real'(t_high) / real'(t_total) - lag) > 0.02 ||
              (lag - real'(t_high) / real'(t_total)) > 0.02) begin
            failures++;
            $display("FAIL lag %0.2f: duty %0.3f", lag, real'(t_high) / real'(t_total));
          end
        end
      join_any
      disable fork;
      ref_in = 1'b0;
      div_in = 1'b0;
      #10;
    end
    // Fine sweep around the lock point.
    begin
      real prev = -1.0;
      for (int p = -18; p <= 18; p++) begin
        real lag, duty;
        lag = 0.5 + real'(p) * 0.1 / 50.0;
        fork
          begin : fclocks
            fork
              forever begin
                #25 ref_in = 1'b1;
                #25 ref_in = 1'b0;
              end
              begin
                #(25.0 + lag * 50.0);
                forever begin
                  div_in = 1'b1;
                  #25 div_in = 1'b0;
                  #25;
                end
              end
            join
          end
          begin : fmeasure
            #1 reset_dut();
            // Measure over a whole number of reference periods.
            #(10 * 50 - 1);
            hi_exact = 0.0; t_start = $realtime;
            if (phi) t_rise = $realtime;
            exact_on = 1'b1;
            #(20 * 50);
            exact_on = 1'b0;
            if (phi) hi_exact += $realtime - t_rise;
            duty = hi_exact / ($realtime - t_start);
            checks++;
            if (duty - lag > 0.001 || lag - duty > 0.001) begin
              failures++;
              $display("FAIL fine lag %0.4f: duty %0.4f", lag, duty);
            end
            checks++;
            if (duty <= prev) begin
              failures++;
              $display("FAIL fine lag %0.4f: duty %0.4f not above %0.4f", lag, duty, prev);
            end
            prev = duty;
          end
        join_any
        disable fork;
        ref_in = 1'b0;
        div_in = 1'b0;
        #10;
      end
      $display("fine sweep: 37 points, 0.1 ns apart, around 50%% duty");
    end
    // Frequency error.
    for (int s = 0; s < 2; s++) begin
      real dper;
      dper = (s == 0) ? 55.0 : 45.0;
      fork
        forever begin
          #25 ref_in = 1'b1;
          #25 ref_in = 1'b0;
        end
        forever begin
          #(dper / 2) div_in = 1'b1;
          #(dper / 2) div_in = 1'b0;
        end
        begin
          #1 reset_dut();
          #(10 * 50);
          t_high = 0; t_total = 0; measuring = 1'b1;
          #(200 * 50);
          measuring = 1'b0;
          checks++;
          if (s == 0 ? (real'(t_high) / real'(t_total) < 0.8)
                     : (real'(t_high) / real'(t_total) > 0.2)) begin
            failures++;
            $display("FAIL frequency case %0d: duty %0.3f", s, real'(t_high) / real'(t_total));
          end
          $display("divider period %0.0f ns against 50 ns: duty %0.3f", dper,
                   real'(t_high) / real'(t_total));
        end
      join_any
      disable fork;
      ref_in = 1'b0;
      div_in = 1'b0;
      #10;
    end
    checks++;
    if (n_sat_high == 0 || n_sat_low == 0) begin
      failures++;
      $display("FAIL saturation not exercised");
    end
    $display("saturated high %0d, low %0d times", n_sat_high, n_sat_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
