// tb_shift_dff: checks one flip-flop stage of the shift chain.
//
// The stage must copy i to o on each rising edge of c, hold its value
// between edges whatever i does, and clear to 0 at once when rst_n falls,
// without a clock edge.
`timescale 1ns / 1ps

module tb_shift_dff;

  logic c = 1'b0, rst_n = 1'b1, i = 1'b0, o;
  logic model = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  shift_dff dut (.c(c), .rst_n(rst_n), .i(i), .o(o));

  task automatic check(string what);
    checks++;
    if (o !== model) begin
      failures++;
      $display("FAIL %s: o=%0b expected %0b", what, o, model);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;       // asynchronous clear from power-up
    #1 check("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      i = 1'($urandom_range(1));
      #2 c = 1'b1;           // rising edge captures i
      model = i;
      #1 check("capture");
      i = ~i;                // input moves with no edge: output holds
      #1 check("hold high");
      c = 1'b0;              // falling edge: no capture
      #1 check("hold falling");
      if (n % 37 == 36) begin
        rst_n = 1'b0;        // asynchronous clear, no clock
        model = 1'b0;
        #1 check("async reset");
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
