// tb_error_timer: self-checking test of the time-error timer.
//
// A reference count kept in the testbench predicts `expire` every cycle:
// it must come on exactly the ET-th enabled cycle after a clear or after
// the previous expiry, never while cleared or disabled. A directed run with
// en held high checks the pulse spacing (one pulse every ET cycles); a
// random run of en/clr patterns checks holding and clearing.
module tb_error_timer;
  localparam int unsigned ET = 7;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic expire;
  int checks = 0, failures = 0;
  int ref_cnt = 0, cyc = 0;
  int last_pulse = -1, spaced = 0, pulses = 0;
  bit directed = 0;

  error_timer #(.ET_CYCLES(ET)) dut (.clk, .rst_n, .clr, .en, .expire);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (expire !== (en && !clr && (ref_cnt == ET - 1))) begin
      failures++;
      $display("FAIL expire=%0b ref_cnt=%0d en=%0b clr=%0b cycle %0d", expire, ref_cnt, en, clr, cyc);
    end
    if (expire) begin
      pulses++;
      if (directed && last_pulse >= 0 && cyc - last_pulse == ET) spaced++;
      last_pulse = cyc;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (clr) ref_cnt = 0;
      else if (en && ref_cnt == ET - 1) ref_cnt = 0;
      else if (en) ref_cnt++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) begin clr = 1; en = 0; end
    @(negedge clk) begin clr = 0; en = 1; directed = 1; end
    repeat (5 * ET) @(negedge clk);
    directed = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 29) == 0);
    end
    @(negedge clk) begin en = 0; clr = 0; end
    repeat (2) @(posedge clk);
    checks++;
    if (spaced < 4) begin
      failures++;
      $display("FAIL spacing: %0d pulses spaced by ET in the directed run", spaced);
    end
    checks++;
    if (pulses < 50) begin
      failures++;
      $display("FAIL too few pulses in the random run: %0d", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
