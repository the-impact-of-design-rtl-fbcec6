// tb_fairisle_dataswitch: self-checking test of the dataswitch.
//
// Drives random bytes every cycle, changes grant/disable every few cycles and
// gives a frame start now and then. A reference model keeps the input, control
// and frame-start histories and expects dout[j] at cycle t to be 0 if a frame
// start came in any of the cycles t-4 to t-1 or output j was disabled at t-4
// (control as presented by the arbiters), else din[grant[j] at t-4] at t-5.
module tb_fairisle_dataswitch;
  localparam int unsigned PORTS = 4;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DATA_DELAY = 5;
  localparam int HIST = 16;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0;
  logic [WIDTH-1:0] din [PORTS];
  logic [1:0] grant [PORTS];
  logic [PORTS-1:0] odis;
  logic [WIDTH-1:0] dout [PORTS];
  int checks = 0, failures = 0, switched = 0, blanked = 0, flushed = 0;

  fairisle_dataswitch #(.PORTS(PORTS), .WIDTH(WIDTH), .DATA_DELAY(DATA_DELAY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] hd [HIST][PORTS];
  logic [1:0]       hg [HIST][PORTS];
  logic [PORTS-1:0] ho [HIST];
  logic             hf [HIST];

  initial begin
    for (int j = 0; j < PORTS; j++) begin din[j] = '0; grant[j] = '0; end
    odis = '1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // outputs now reflect the edges up to cycle t-1
      if (t >= DATA_DELAY + 1) begin
        for (int j = 0; j < PORTS; j++) begin
          logic [WIDTH-1:0] e;
          int tc, td;
          logic fl;
          tc = (t - (DATA_DELAY - 1)) % HIST;
          td = (t - DATA_DELAY) % HIST;
          fl = 1'b0;
          for (int b = 1; b <= DATA_DELAY - 1; b++) if (hf[(t - b) % HIST]) fl = 1'b1;
          e = (fl || ho[tc][j]) ? '0 : hd[td][hg[tc][j]];
          checks++;
          if (fl && !ho[tc][j]) flushed++;
          if (fl || ho[tc][j]) blanked++; else switched++;
          if (dout[j] !== e) begin
            failures++;
            $display("t=%0d out %0d: %02h expected %02h", t, j, dout[j], e);
          end
        end
      end
      for (int i = 0; i < PORTS; i++) din[i] = WIDTH'($urandom);
      if ($urandom % 4 == 0) begin
        for (int j = 0; j < PORTS; j++) grant[j] = 2'($urandom);
        odis = PORTS'($urandom);
      end
      for (int i = 0; i < PORTS; i++) begin
        hd[t % HIST][i] = din[i];
        hg[t % HIST][i] = grant[i];
      end
      fs = ($urandom % 12 == 0);
      ho[t % HIST] = odis;
      hf[t % HIST] = fs;
    end
    if (switched == 0 || blanked == 0 || flushed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
