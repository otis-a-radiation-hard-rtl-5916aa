// tb_trigger_ctrl: drives a ring write pointer (0..163) and triggers, and
// checks the pipeline read addresses (triggered data set = pointer at the
// trigger minus the latency, then the next two), the derandomizer write
// strobes one cycle later, the loss of a third trigger in a burst and of a
// trigger when the derandomizer is full, and the latency clamp to 160.
`timescale 1ns / 1ps
module tb_trigger_ctrl;
  logic clk = 0, rst_n = 0, trigger = 0, der_full = 0;
  logic [7:0] wptr = 0, latency = 160, pipe_raddr;
  logic der_alloc, der_we, der_we_last, trig_lost, busy;
  int checks = 0, failures = 0, n_lost = 0, n_acc = 0;
  int expq [$];
  int we_exp = 0, we_last_exp = 0;
  trigger_ctrl dut (.clk, .rst_n, .trigger, .wptr, .latency, .der_full,
                    .pipe_raddr, .der_alloc, .der_we, .der_we_last,
                    .trig_lost, .busy);
  always #12.5 clk = ~clk;
  always @(posedge clk) if (rst_n) wptr <= (wptr == 163) ? 8'd0 : wptr + 1;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // checker, sampled just before each rising edge
  int q_entries = 0;
  always @(negedge clk) if (rst_n) begin
    #12;
    checks++;
    if (der_we != (we_exp != 0) || der_we_last != (we_last_exp != 0)) begin
      failures++;
      $display("der_we %0b/%0b expected %0d/%0d", der_we, der_we_last, we_exp, we_last_exp);
    end
    we_exp = 0; we_last_exp = 0;
    if (busy) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (pipe_raddr != 8'(e)) begin
        failures++;
        $display("raddr %0d expected %0d at %t lat %0d", pipe_raddr, e, $time, latency);
      end
      we_exp = 1;
      we_last_exp = (expq.size() % 3 == 0);
    end else if (expq.size() != 0) begin
      failures++;
      $display("idle with pending reads");
    end
  end
  task automatic trig(input bit expect_ok);
    int base, lat;
    @(negedge clk);
    trigger = 1;
    lat  = (latency > 160) ? 160 : latency;
    base = (wptr + 164 - lat) % 164;
    #12;
    checks++;
    if (der_alloc != expect_ok || trig_lost == expect_ok) begin
      failures++;
      $display("trigger accept %0b expected %0b", der_alloc, expect_ok);
    end
    if (expect_ok) begin
      n_acc++;
      for (int k = 0; k < 3; k++) expq.push_back((base + k) % 164);
    end else n_lost++;
    @(negedge clk);
    trigger = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    trig(1);                               // single trigger
    repeat (10) @(posedge clk);
    // back to back: drive trigger for 3 consecutive cycles
    @(negedge clk); trigger = 1;
    begin
      int lat = 160;
      for (int k = 0; k < 3; k++) begin
        int base;
        base = (wptr + 164 - lat) % 164;
        #12;
        checks++;
        if ((k < 2) != der_alloc) begin
          failures++;
          $display("burst trigger %0d accept %0b", k, der_alloc);
        end
        if (der_alloc) for (int r = 0; r < 3; r++) expq.push_back((base + r) % 164);
        else n_lost++;
        @(negedge clk);
      end
    end
    trigger = 0;
    repeat (10) @(posedge clk);
    der_full = 1; trig(0); der_full = 0;   // derandomizer full
    repeat (10) @(posedge clk);
    latency = 200; trig(1);                // clamped latency
    repeat (10) @(posedge clk);
    latency = 5; trig(1);
    repeat (10) @(posedge clk);
    latency = 160;
    // random triggers over many pointer wraps
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(6, 0)) @(posedge clk);
      wait (!busy);
      trig(1);
    end
    repeat (10) @(posedge clk);
    checks++; if (expq.size() != 0 || n_lost != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
