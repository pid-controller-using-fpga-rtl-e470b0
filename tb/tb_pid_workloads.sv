// tb_pid_workloads: the closed-loop experiments on the second-order plant.
//
// Seven loops run side by side, each a controller with its own tuning on
// its own plant model, all given a 2 V set point step (code 102) after
// reset: P and PI on the overdamped plant (M = 1.80); P, PD, PI and PID on
// the underdamped plant (M = 0.56); and PI with the integral gain read as
// KI = Kp*T/Ti = 0.5 per sample. Tuning: Kp = 2; Ti = 4 ms; Td = T/2 (the
// defaults). After 40 ms it checks
//   - P and PD: a static error of 1/(1 + Kp*Ks) = 43 % (reading 58 +- 2);
//   - PI and PID: no static error (reading 102 +- 2);
//   - on the underdamped plant, P overshoots its final value and PD
//     overshoots no more than P; PID overshoots no more than PI;
//   - the per-sample reading of KI = 0.5 does not settle (the loop is
//     unstable at this sampling period), which is why it is not the default;
//   - no converter protocol errors.
`timescale 1ns / 1ps
module tb_pid_workloads;
  import pid_pkg::*;

  localparam int N = 7;
  localparam string NAME [N] = '{"P m=1.80", "PI m=1.80", "P m=0.56", "PD m=0.56",
                                 "PI m=0.56", "PID m=0.56", "PI KI=0.5/sample m=0.56"};

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] ref_in;
  logic [7:0] reading [N];
  logic [7:0] peak    [N];
  int         errors  [N];
  logic [7:0] lo [N], hi [N];

  int checks = 0, failures = 0;

  pid_loop_bench #(.KP(2.0), .TI(0.0),    .TD(0.0),      .M(1.80)) l0 (clk, rst, ref_in, reading[0], peak[0], errors[0]);
  pid_loop_bench #(.KP(2.0), .TI(4.0e-3), .TD(0.0),      .M(1.80)) l1 (clk, rst, ref_in, reading[1], peak[1], errors[1]);
  pid_loop_bench #(.KP(2.0), .TI(0.0),    .TD(0.0),      .M(0.56)) l2 (clk, rst, ref_in, reading[2], peak[2], errors[2]);
  pid_loop_bench #(.KP(2.0), .TI(0.0),    .TD(2.7e-6),   .M(0.56)) l3 (clk, rst, ref_in, reading[3], peak[3], errors[3]);
  pid_loop_bench #(.KP(2.0), .TI(4.0e-3), .TD(0.0),      .M(0.56)) l4 (clk, rst, ref_in, reading[4], peak[4], errors[4]);
  pid_loop_bench #(.KP(2.0), .TI(4.0e-3), .TD(2.7e-6),   .M(0.56)) l5 (clk, rst, ref_in, reading[5], peak[5], errors[5]);
  pid_loop_bench #(.KP(2.0), .TI(2.16e-5),.TD(0.0),      .M(0.56)) l6 (clk, rst, ref_in, reading[6], peak[6], errors[6]);

  always #10 clk = ~clk;

  localparam int RUN_CYC = 2000000;   // 40 ms

  initial begin : watchdog
    repeat (RUN_CYC + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; ref_in = 8'd0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0; ref_in = 8'd102;
    repeat (RUN_CYC - 20 * ADC_PERIOD_CYC) @(posedge clk);
    for (int i = 0; i < N; i++) begin lo[i] = 8'd255; hi[i] = 8'd0; end
    repeat (20) begin
      repeat (ADC_PERIOD_CYC) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (reading[i] < lo[i]) lo[i] = reading[i];
        if (reading[i] > hi[i]) hi[i] = reading[i];
      end
    end
    for (int i = 0; i < N; i++)
      $display("%-24s final %0d..%0d  peak %0d  static error %0d %%", NAME[i], lo[i], hi[i],
               peak[i], (102 - int'(lo[i])) * 100 / 102);
    check(lo[0] >= 56 && hi[0] <= 60, "P m=1.80: 43 % static error");
    check(lo[1] >= 100 && hi[1] <= 104, "PI m=1.80: no static error");
    check(lo[2] >= 56 && hi[2] <= 60, "P m=0.56: 43 % static error");
    check(lo[3] >= 56 && hi[3] <= 60, "PD m=0.56: 43 % static error");
    check(lo[4] >= 100 && hi[4] <= 104, "PI m=0.56: no static error");
    check(lo[5] >= 100 && hi[5] <= 104, "PID m=0.56: no static error");
    check(peak[2] > hi[2] + 5, "P m=0.56 overshoots");
    check(peak[3] <= peak[2], "PD overshoots no more than P");
    check(peak[5] <= peak[4], "PID overshoots no more than PI");
    check(peak[0] <= hi[0] + 1, "P m=1.80 does not overshoot");
    check(hi[6] - lo[6] > 20, "KI = 0.5 per sample does not settle");
    for (int i = 0; i < N; i++) check(errors[i] == 0, $sformatf("%s: converter protocol", NAME[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
