// tb_ppl: drives random 64-bin pictures (sparse pulses, long pulses across
// period boundaries, empty pictures) and checks the decoded hit flag and
// drift time one cycle later against a reference search for the first
// 0->1 transition. Then checks the play back chain stage and that play back
// mode sends the play back value instead of the decoded one.
`timescale 1ns / 1ps
module tb_ppl;
  import otis_pkg::*;
  logic clk = 0, rst_n = 0, pb_mode = 0, pb_shift = 0;
  logic [63:0] pic, prev;
  chan_t pb_in, pb_out, q, exp;
  int checks = 0, failures = 0;
  ppl dut (.clk, .rst_n, .pic, .pb_mode, .pb_shift, .pb_in, .pb_out, .q);
  always #12.5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic chan_t ref_dec(logic [63:0] p, logic last);
    chan_t r = '0;
    logic prv = last;
    for (int i = 0; i < 64; i++) begin
      if (p[i] && !prv && !r.hit) begin
        r.hit = 1;
        r.t   = 6'(i);
      end
      prv = p[i];
    end
    return r;
  endfunction
  initial begin
    pic = '0; pb_in = '0; prev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case ($urandom_range(3))
        0: pic = '0;
        1: pic = '1;
        2: begin
          int a = $urandom_range(63), b = $urandom_range(63);
          pic = '0;
          for (int i = 0; i < 64; i++) if (i >= a && i <= b) pic[i] = 1;
        end
        default: pic = {$urandom, $urandom} & {$urandom, $urandom};
      endcase
      exp = ref_dec(pic, prev[63]);
      prev = pic;
      @(posedge clk); @(negedge clk);
      checks++;
      if (q != exp) begin
        failures++;
        $display("pic=%h q=%p exp=%p", pic, q, exp);
      end
    end
    // play back
    @(negedge clk);
    pb_in = '{hit: 1'b1, t: 6'd42}; pb_shift = 1;
    @(negedge clk);
    pb_shift = 0; pb_in = '{hit: 1'b0, t: 6'd7};
    checks++; if (pb_out != chan_t'({1'b1, 6'd42})) failures++;
    pb_mode = 1; pic = '1;
    repeat (3) @(negedge clk);
    checks++; if (q != chan_t'({1'b1, 6'd42})) failures++;
    checks++; if (pb_out != chan_t'({1'b1, 6'd42})) failures++;   // no shift
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
