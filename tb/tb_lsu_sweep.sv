// tb_lsu_sweep: configuration sweep of the preload load/store unit.
//
// The source design is evaluated by varying the UMAB size (4 to 40 entries),
// the number of load/store ports (1 to 4, UMAB 32) and by removing the
// scheduling stage (reduced pipeline). Its programs are x86 benchmark
// traces, which need a whole processor. This bench instead runs one
// synthetic program (about half of the micro-operations are loads and
// stores, 1-2 cycle ALUs, frequent address dependences on earlier results)
// on twelve copies of the unit side by side, one per configuration. Each
// copy is checked in full by lsu_env: load values, final memory, retirement,
// unloaded latency.
// The bench prints cycles, cache reads per load and event counts per
// configuration, relative to the 4-entry UMAB. It also checks the trends that
// must hold on any program:
//  - a 32-entry UMAB is faster than a 4-entry one;
//  - 3 ports are faster than 1, and 2 ports are no slower than 1;
//  - with a 32-entry UMAB, loads pass unsolved stores (preloads happen) and
//    forwarding happens;
//  - the reduced pipeline is no slower than the five-stage one.
// The configurations are the source design's; the program and the thresholds
// are this bench's own.
module tb_lsu_sweep;
  import lsu_pkg::*;

  localparam int NCFG = 12;
  localparam int WATCHDOG = 400000;
  // configurations: 0-7 UMAB sweep with 3 ports; 8-10 ports 1, 2, 4 with UMAB 32; 11 reduced pipeline
  localparam int CFG_UMAB [NCFG] = '{4, 8, 12, 16, 20, 24, 32, 40, 32, 32, 32, 32};
  localparam int CFG_NP   [NCFG] = '{3, 3, 3, 3, 3, 3, 3, 3, 1, 2, 4, 3};
  localparam bit CFG_RED  [NCFG] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int checks_c [NCFG], failures_c [NCFG], cycles_c [NCFG], reads_c [NCFG], loads_c [NCFG];
  int pre_c [NCFG], fwd_c [NCFG], part_c [NCFG], stale_c [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    lsu_env #(
      .UMAB_N (CFG_UMAB[c]),
      .NP     (CFG_NP[c]),
      .REDUCED(CFG_RED[c]),
      .N_OPS  (3000),
      .SEED   (7),
      .REGION (160)
    ) u_env (
      .clk, .rst_n,
      .done      (done[c]),
      .checks    (checks_c[c]),
      .failures  (failures_c[c]),
      .cycles    (cycles_c[c]),
      .dc_reads  (reads_c[c]),
      .loads_done(loads_c[c]),
      .ev_preload(pre_c[c]),
      .ev_forward(fwd_c[c]),
      .ev_partial(part_c[c]),
      .ev_stale  (stale_c[c])
    );
  end

  int checks, failures;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    @(negedge clk);
    $display(" UMAB ports reduced  cycles  speedup  reads/load  preload  forward  partial  stale");
    for (int c = 0; c < NCFG; c++)
      $display(" %4d %5d %7d %7d %8.3f %11.3f %8d %8d %8d %6d",
               CFG_UMAB[c], CFG_NP[c], CFG_RED[c], cycles_c[c],
               real'(cycles_c[0]) / real'(cycles_c[c]),
               real'(reads_c[c]) / real'(loads_c[c]), pre_c[c], fwd_c[c], part_c[c], stale_c[c]);
    for (int c = 0; c < NCFG; c++) begin
      checks   += checks_c[c];
      failures += failures_c[c];
    end
    expect_true(cycles_c[6] < cycles_c[0], "32-entry UMAB not faster than 4-entry UMAB");
    expect_true(cycles_c[6] < cycles_c[8], "3 ports not faster than 1 port");
    expect_true(cycles_c[9] <= cycles_c[8], "2 ports slower than 1 port");
    expect_true(pre_c[6] > 0, "no load passed an unsolved store");
    expect_true(fwd_c[6] > 0, "no forwarding");
    expect_true(cycles_c[11] <= cycles_c[6], "reduced pipeline slower than the five-stage one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
