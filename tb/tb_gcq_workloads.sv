// Workload test: uniform random traffic through several switch
// configurations, each in its own bench with its own clocks, run side by side.
// Traffic is Bernoulli per input with a uniformly chosen output per packet,
// as in the published simulation study of the architecture.
//   A  16x16, S=4, 576-flit buffers, 1-flit packets,  load 0.95 (hardware defaults)
//   B  16x16, S=4,  64-flit buffers, 1-flit packets,  load 0.90
//   C  16x16, S=4,   8-flit buffers, 1-flit packets,  load 0.80
//   D  16x16, S=4, 576-flit buffers, 16-flit packets, load 0.80
//   E  16x16, S=4,  64-flit buffers, 16-flit packets, load 0.80
//   F  16x16, S=4,  16-flit buffers, 32-flit VOQs, 1-flit packets, full load
//   G   9x9,  S=3, 576-flit buffers, 1-flit packets,  load 0.90
//   H  16x16, S=8,  64-flit buffers, 1-flit packets,  load 0.95
// For each the offered and accepted throughput (flits per port per port
// cycle) and the mean flit latency in port cycles, source queueing included,
// are printed. Checked: every flit arrives intact and in order; buffers and
// credits are restored after the drain; every configuration delivers
// traffic; with single-flit packets below saturation the switch keeps up
// with the offered load (accepted at least 97 % of offered); at full load
// with 32-flit VOQs it sustains at least 90 % (the published study reports
// close to 100 % from 32-flit input queues on). Long packets are only
// reported, since their offered load over a short window varies too much.
module tb_gcq_workloads;
  localparam int NB = 8;
  localparam int MEAS = 2000;
  logic   done [NB];
  int     chk [NB], fail [NB], dlv [NB], off [NB];
  longint lat [NB];
  int     ports [NB] = '{16, 16, 16, 16, 16, 16, 9, 16};
  int     need  [NB] = '{97, 97, 97, 0, 0, 90, 97, 97};   // percent of offered, 0 = report only
  string  name  [NB] = '{"A S4 576 1-flit", "B S4 64 1-flit", "C S4 8 1-flit", "D S4 576 16-flit", "E S4 64 16-flit", "F S4 16 IQ32 sat.", "G 9x9 S3 576 1-flit", "H S8 64 1-flit"};

  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(576), .IQ_DEPTH(16), .PKT_LEN(1), .LOAD_PM(950), .MEASURE(MEAS))
    u_a (done[0], chk[0], fail[0], dlv[0], lat[0], off[0]);
  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(64), .IQ_DEPTH(16), .PKT_LEN(1), .LOAD_PM(900), .MEASURE(MEAS))
    u_b (done[1], chk[1], fail[1], dlv[1], lat[1], off[1]);
  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(8), .IQ_DEPTH(16), .PKT_LEN(1), .LOAD_PM(800), .MEASURE(MEAS))
    u_c (done[2], chk[2], fail[2], dlv[2], lat[2], off[2]);
  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(576), .IQ_DEPTH(16), .PKT_LEN(16), .LOAD_PM(800), .MEASURE(MEAS))
    u_d (done[3], chk[3], fail[3], dlv[3], lat[3], off[3]);
  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(64), .IQ_DEPTH(16), .PKT_LEN(16), .LOAD_PM(800), .MEASURE(MEAS))
    u_e (done[4], chk[4], fail[4], dlv[4], lat[4], off[4]);
  gcq_traffic_bench #(.N(16), .S(4), .BUF_DEPTH(16), .IQ_DEPTH(32), .PKT_LEN(1), .LOAD_PM(1000), .MEASURE(MEAS))
    u_f (done[5], chk[5], fail[5], dlv[5], lat[5], off[5]);
  gcq_traffic_bench #(.N(9), .S(3), .BUF_DEPTH(576), .IQ_DEPTH(16), .PKT_LEN(1), .LOAD_PM(900), .MEASURE(MEAS))
    u_g (done[6], chk[6], fail[6], dlv[6], lat[6], off[6]);
  gcq_traffic_bench #(.N(16), .S(8), .BUF_DEPTH(64), .IQ_DEPTH(16), .PKT_LEN(1), .LOAD_PM(950), .MEASURE(MEAS))
    u_h (done[7], chk[7], fail[7], dlv[7], lat[7], off[7]);

  int checks = 0, failures = 0;

  initial begin
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int b = 0; b < NB; b++) if (!done[b]) all = 0;
    end
    for (int b = 0; b < NB; b++) begin
      real thr, offered;
      thr = real'(dlv[b]) / real'(ports[b] * MEAS);
      offered = real'(off[b]) / real'(ports[b] * MEAS);
      $display("%-22s offered %0.3f  accepted %0.3f  mean latency %0.1f port cycles",
               name[b], offered, thr, (dlv[b] > 0) ? real'(lat[b]) / real'(dlv[b]) : 0.0);
      checks += chk[b]; failures += fail[b];
      checks++;
      if (dlv[b] == 0) begin failures++; $display("FAIL %s delivered nothing", name[b]); end
      if (need[b] > 0) begin
        checks++;
        if (thr * 100.0 < real'(need[b]) * offered) begin
          failures++; $display("FAIL %s accepted less than %0d %% of the offered load", name[b], need[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
