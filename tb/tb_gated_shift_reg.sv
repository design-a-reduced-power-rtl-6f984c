// tb_gated_shift_reg: end-to-end test of the clock-gated shift register at
// its default size (8 stages).
//
// A 50 MHz clock (20 ns period) runs the register. The serial input is
// changed only while clk is low, 2 ns after each falling edge, and the
// register updates at the next falling edge. After every falling edge the
// testbench compares the whole chain and the serial output with its own
// model of an 8-bit shift-left register, and it counts the rising edges of
// every stage's local clock: a stage must receive exactly one edge in a
// cycle where its bit changes and none in a cycle where it does not.
//
// Input patterns: all zeros, all ones, alternating, random, random runs of
// equal bits, and a reset in the middle of a stream. For each pattern the
// number of local clock edges is printed against the 8 per cycle that an
// ungated register would receive. Also checked: the latency of 8 cycles
// from si to so for a single 1 after reset. Every mechanism (open gate,
// closed gate, reset, serial output of a shifted bit) must occur.
`timescale 1ns / 1ps

module tb_gated_shift_reg;

  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b1, si = 1'b0, so;

  gated_shift_reg dut (.clk(clk), .rst_n(rst_n), .si(si), .so(so));

  always #10 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Rising edges of every stage's local clock in the current cycle.
  int pulses [W];
  for (genvar k = 0; k < W; k++) begin : g_count
    always @(posedge dut.gclk[k]) pulses[k]++;
  end

  logic [W-1:0] model = '0;   // model[k] = stage k, model[W-1] = so
  int  n_open = 0, n_closed = 0, n_reset = 0, n_ones_out = 0;
  longint phase_pulses, phase_cycles;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One clock cycle: present bit b, let the falling edge update the chain,
  // then compare chain, output and local clock edges with the model.
  task automatic cycle(logic b);
    logic [W-1:0] next;
    si = b;
    foreach (pulses[k]) pulses[k] = 0;
    @(negedge clk);
    #1;
    next = {model[W-2:0], b};
    check(dut.d[W:1] == next, $sformatf("chain %b expected %b", dut.d[W:1], next));
    check(so == next[W-1], "serial output");
    for (int k = 0; k < W; k++) begin
      int want = (next[k] != model[k]) ? 1 : 0;
      check(pulses[k] == want,
            $sformatf("stage %0d got %0d clock edges, expected %0d", k, pulses[k], want));
      if (want == 1) n_open++; else n_closed++;
      phase_pulses += longint'(pulses[k]);
    end
    if (next[W-1]) n_ones_out++;
    phase_cycles++;
    model = next;
    #1;  // next si is driven 2 ns after the falling edge, clk still low
  endtask

  task automatic start_phase();
    phase_pulses = 0;
    phase_cycles = 0;
  endtask

  task automatic end_phase(string name);
    $display("%-12s cycles=%0d local clock edges=%0d ungated=%0d (%0d%% of ungated)",
             name, phase_cycles, phase_pulses, phase_cycles * W,
             (phase_pulses * 100) / (phase_cycles * W));
  endtask

  task automatic do_reset();
    // Asserted and released while clk is low.
    @(negedge clk);
    #3 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    model = '0;
    n_reset++;
    check(dut.d[W:1] == '0 && so == 1'b0, "chain clear after reset");
    #1;
  endtask

  initial begin
    int lat;
    check($bits(dut.gclk) == W, "register width");

    // Power-up reset, asserted while clk is low.
    #1 rst_n = 1'b0;
    #4;
    check(dut.d[W:1] == '0, "chain clear during reset");
    rst_n = 1'b1;
    n_reset++;
    #1;

    // Latency: a single 1 after reset reaches so at the W-th falling edge.
    lat = 0;
    cycle(1'b1);
    lat++;
    while (so == 1'b0 && lat < 2 * W) begin
      cycle(1'b0);
      lat++;
    end
    check(lat == W, $sformatf("latency %0d cycles, expected %0d", lat, W));
    repeat (W) cycle(1'b0);

    start_phase();
    repeat (40) cycle(1'b0);
    end_phase("zeros");

    start_phase();
    repeat (40) cycle(1'b1);
    end_phase("ones");

    start_phase();
    for (int n = 0; n < 40; n++) cycle(n[0]);
    end_phase("alternating");

    start_phase();
    repeat (400) cycle(1'($urandom_range(1)));
    end_phase("random");

    start_phase();
    repeat (40) begin
      logic b;
      b = 1'($urandom_range(1));
      repeat ($urandom_range(1, 12)) cycle(b);
    end
    end_phase("runs");

    // Reset in the middle of a stream of ones.
    repeat (5) cycle(1'b1);
    do_reset();
    repeat (20) cycle(1'($urandom_range(1)));

    check(n_open > 0,     "an open clock gate was seen");
    check(n_closed > 0,   "a closed clock gate was seen");
    check(n_reset > 1,    "a reset in mid-stream was seen");
    check(n_ones_out > 0, "a shifted bit reached the serial output");
    $display("gate open %0d, gate closed %0d, resets %0d, ones out %0d",
             n_open, n_closed, n_reset, n_ones_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: far more cycles than the test needs.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
