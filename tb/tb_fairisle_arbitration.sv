// tb_fairisle_arbitration: self-checking test of the arbitration unit
// (timing unit, decoder, priority filter and four arbiters together).
//
// Sends frames with a frame start, idle links, one header cycle at a random
// delay of 5 to 10 cycles and random bytes after it. Bytes with the active
// bit set are also placed in the frame-start cycle, which must be ignored.
// A reference model computes the winner of each output and expects every
// odis bit to be 1 from the cycle after the frame start to t_h+1, and
// grant/odis to show the winners from t_h+2 to the next frame start.
module tb_fairisle_arbitration;
  import fairisle_pkg::*;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0;
  byte_t din [PORTS];
  port_t grant [PORTS];
  logic [PORTS-1:0] odis;
  int checks = 0, failures = 0, granted = 0, disabled_outs = 0, fs_headers = 0;

  fairisle_arbitration dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last [PORTS], win [PORTS], pwin [PORTS];
    int len, h;
    logic act [PORTS], pri [PORTS];
    int rte [PORTS];
    for (int j = 0; j < PORTS; j++) begin din[j] = '0; last[j] = PORTS - 1; win[j] = -1; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 500; f++) begin
      h = 5 + $urandom % 6;
      len = h + 6 + $urandom % 10;
      for (int i = 0; i < PORTS; i++) begin
        act[i] = ($urandom % 4 != 0);
        pri[i] = ($urandom % 3 == 0);
        rte[i] = $urandom % PORTS;
      end
      for (int j = 0; j < PORTS; j++) begin
        logic [PORTS-1:0] hi, lo, rq;
        pwin[j] = win[j];
        hi = '0; lo = '0;
        for (int i = 0; i < PORTS; i++)
          if (act[i] && rte[i] == j) begin if (pri[i]) hi[i] = 1'b1; else lo[i] = 1'b1; end
        rq = (hi != 0) ? hi : lo;
        win[j] = -1;
        for (int k = 1; k <= PORTS; k++)
          if (win[j] < 0 && rq[(last[j] + k) % PORTS]) win[j] = (last[j] + k) % PORTS;
        if (win[j] >= 0) last[j] = win[j];
      end
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        // outputs now show the state after the previous cycle's edge
        for (int j = 0; j < PORTS; j++) begin
          int e;
          if (k == 0)          e = pwin[j];
          else if (k <= h + 1) e = -1;
          else                 e = win[j];
          checks++;
          if (e < 0) begin
            disabled_outs++;
            if (odis[j] !== 1'b1) begin failures++; $display("f%0d k%0d out %0d not disabled", f, k, j); end
          end else begin
            granted++;
            if (odis[j] !== 1'b0 || grant[j] !== port_t'(e)) begin
              failures++;
              $display("f%0d k%0d out %0d: odis=%0b grant=%0d expected %0d", f, k, j, odis[j], grant[j], e);
            end
          end
        end
        fs = (k == 0);
        for (int i = 0; i < PORTS; i++) begin
          if (k == 0 && $urandom % 2 == 0) begin din[i] = 8'h01; fs_headers++; end
          else if (k < h) din[i] = '0;
          else if (k == h) din[i] = byte_t'(act[i] ? make_tag(1'b1, pri[i], port_t'(rte[i])) : '0);
          else din[i] = byte_t'($urandom);
        end
      end
    end
    if (granted == 0 || disabled_outs == 0 || fs_headers == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
