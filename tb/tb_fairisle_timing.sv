// tb_fairisle_timing: self-checking test of the timing unit.
//
// Runs frames of random length (11 to 70 cycles) with random active bits on
// the four links, including active bits in the frame-start cycle and in the
// four cycles after it, which must be ignored. The reference rule: route_enable
// is high at offset k+1 of a frame exactly when k is the first offset at or
// after FS_DELAY whose active bits are not all zero.
module tb_fairisle_timing;
  localparam int unsigned PORTS = 4;
  localparam int unsigned FS_DELAY = 5;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0;
  logic [PORTS-1:0] active = '0;
  logic route_enable;
  int checks = 0, failures = 0, fired = 0, early_ignored = 0;

  fairisle_timing #(.PORTS(PORTS), .FS_DELAY(FS_DELAY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, k, first;
    logic [PORTS-1:0] pat [80];
    logic exp_next;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    exp_next = 1'b0;
    for (int f = 0; f < 300; f++) begin
      len = 11 + ($urandom % 60);
      first = -1;
      for (k = 0; k < len; k++) begin
        // sparse headers; sometimes none at all in a frame
        pat[k] = ($urandom % 6 == 0) ? PORTS'($urandom) : '0;
        if (k < FS_DELAY && pat[k] != 0) early_ignored++;
        if (first < 0 && k >= FS_DELAY && pat[k] != 0) first = k;
      end
      for (k = 0; k < len; k++) begin
        @(negedge clk);
        checks++;
        if (route_enable !== exp_next) begin
          failures++;
          $display("frame %0d offset %0d: route_enable=%0b expected %0b", f, k, route_enable, exp_next);
        end
        if (route_enable) fired++;
        fs     = (k == 0);
        active = pat[k];
        exp_next = (k == first);
      end
    end
    @(negedge clk);
    checks++;
    if (route_enable !== exp_next) failures++;
    if (fired < 100) begin failures++; $display("too few headers taken: %0d", fired); end
    if (early_ignored == 0) begin failures++; $display("no early active bit exercised"); end
    $display("headers taken=%0d early active bits=%0d", fired, early_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
