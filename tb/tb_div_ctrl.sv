// tb_div_ctrl: checks the divider sequencer cycle by cycle. For each
// operation (alternating radix) it expects one load pulse in the start
// cycle, then exactly 19 (radix 10) or 16 (radix 16) step cycles, one
// finish cycle and a done pulse, i.e. done 20 / 17 cycles after start;
// busy must be high throughout and a start issued while busy must be
// ignored. Back-to-back starts (in the done cycle) are included.
module tb_div_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, radix10 = 1'b1;
  logic load, step, finish, busy, done;
  logic [5:0] iter;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  div_ctrl dut (.clk, .rst_n, .start, .radix10, .load, .step, .finish, .busy, .done, .iter);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int nsteps, lat, nit;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      radix10 = n[0];
      nit = radix10 ? 19 : 16;
      start = 1'b1;
      #1 chk(load && !busy, "load");
      @(negedge clk);
      start = 1'b0;
      nsteps = 0;
      lat = 0;
      while (!done) begin
        chk(busy && !load, "busy");
        if (n % 3 == 0 && lat == 4) start = 1'b1;       // ignored while busy
        else start = 1'b0;
        if (step) nsteps++;
        if (finish) chk(nsteps == nit, "steps before finish");
        @(negedge clk);
        lat++;
      end
      chk(lat == nit + 1, "latency");
      chk(!busy && !step, "idle at done");
      if (n % 2 == 0) @(negedge clk);   // otherwise start again in the done cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
