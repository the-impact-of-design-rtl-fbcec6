// tb_fairisle_arbiter: self-checking test of one round-robin arbiter.
//
// Repeats frames: a frame start, a few idle cycles, a one-cycle route_enable
// with a random request vector, then a few cycles of hold. A reference model
// keeps its own last-granted pointer and expects the first requesting input
// after it; it also checks that the output is disabled from the cycle after
// the frame start until the cycle after route_enable, and that grant and
// disable then hold.
module tb_fairisle_arbiter;
  localparam int unsigned PORTS = 4;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0, route_enable = 1'b0;
  logic [PORTS-1:0] req = '0;
  logic [1:0] grant;
  logic odis;
  int checks = 0, failures = 0, rotations = 0, empties = 0;

  fairisle_arbiter #(.PORTS(PORTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic f, input logic re, input logic [PORTS-1:0] r);
    @(negedge clk);
    fs = f; route_enable = re; req = r;
  endtask

  task automatic expect_out(input logic eo, input logic [1:0] eg, input bit check_grant);
    checks++;
    if (odis !== eo || (check_grant && grant !== eg)) begin
      failures++;
      $display("t=%0t odis=%0b grant=%0d expected odis=%0b grant=%0d", $time, odis, grant, eo, eg);
    end
  endtask

  initial begin
    int last, win, idle, hold;
    logic [PORTS-1:0] r;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    last = PORTS - 1;
    win = 0;
    for (int f = 0; f < 1000; f++) begin
      step(1'b1, 1'b0, PORTS'($urandom));
      idle = $urandom % 4;
      for (int k = 0; k < idle; k++) begin
        step(1'b0, 1'b0, PORTS'($urandom));
        expect_out(1'b1, 0, 0);
      end
      r = ($urandom % 8 == 0) ? '0 : PORTS'($urandom);
      step(1'b0, 1'b1, r);
      expect_out(1'b1, 0, 0);
      win = -1;
      for (int k = 1; k <= PORTS; k++)
        if (win < 0 && r[(last + k) % PORTS]) win = (last + k) % PORTS;
      if (win < 0) empties++;
      else begin
        if (win != (last + 1) % PORTS) rotations++;
        last = win;
      end
      hold = 1 + $urandom % 4;
      for (int k = 0; k < hold; k++) begin
        step(1'b0, 1'b0, PORTS'($urandom));
        expect_out(win < 0, 2'(win), win >= 0);
      end
    end
    if (empties == 0 || rotations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
