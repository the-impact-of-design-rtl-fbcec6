// tb_fairisle_decoder: self-checking test of the routing-tag decoder.
//
// Drives random bytes on the four links and checks, one cycle later, each
// entry of the high- and low-priority request matrices against the tag layout
// (bit 0 active, bit 1 priority, bits 3:2 route), and the combinational
// active bits in the same cycle.
module tb_fairisle_decoder;
  localparam int unsigned PORTS = 4;
  localparam int unsigned WIDTH = 8;

  logic clk = 1'b0, rst = 1'b1;
  logic [WIDTH-1:0] din [PORTS];
  logic [PORTS-1:0] active;
  logic [PORTS-1:0] req_hi [PORTS];
  logic [PORTS-1:0] req_lo [PORTS];
  int checks = 0, failures = 0;

  fairisle_decoder #(.PORTS(PORTS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] prev [PORTS];
    for (int i = 0; i < PORTS; i++) begin din[i] = '0; prev[i] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < PORTS; i++) din[i] = WIDTH'($urandom);
      #1;
      for (int i = 0; i < PORTS; i++) begin
        checks++;
        if (active[i] !== din[i][0]) failures++;
      end
      @(negedge clk);
      for (int j = 0; j < PORTS; j++)
        for (int i = 0; i < PORTS; i++) begin
          logic eh, el;
          eh = din[i][0] &&  din[i][1] && (din[i][3:2] == j);
          el = din[i][0] && !din[i][1] && (din[i][3:2] == j);
          checks++;
          if (req_hi[j][i] !== eh || req_lo[j][i] !== el) begin
            failures++;
            $display("byte %02h in %0d out %0d: hi=%0b lo=%0b", din[i], i, j, req_hi[j][i], req_lo[j][i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
