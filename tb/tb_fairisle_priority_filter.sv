// tb_fairisle_priority_filter: self-checking test of the priority filter.
//
// Random high- and low-priority request vectors for every output; the
// expected result is the high-priority vector when it is not empty, the
// low-priority one otherwise.
module tb_fairisle_priority_filter;
  localparam int unsigned PORTS = 4;

  logic [PORTS-1:0] req_hi [PORTS];
  logic [PORTS-1:0] req_lo [PORTS];
  logic [PORTS-1:0] req    [PORTS];
  int checks = 0, failures = 0, hi_cases = 0, lo_cases = 0;

  fairisle_priority_filter #(.PORTS(PORTS)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < PORTS; j++) begin
        req_hi[j] = ($urandom % 3 == 0) ? PORTS'($urandom) : '0;
        req_lo[j] = PORTS'($urandom);
      end
      #1;
      for (int j = 0; j < PORTS; j++) begin
        logic [PORTS-1:0] e;
        if (req_hi[j] != 0) begin e = req_hi[j]; hi_cases++; end
        else begin e = req_lo[j]; lo_cases++; end
        checks++;
        if (req[j] !== e) begin
          failures++;
          $display("hi=%b lo=%b got %b", req_hi[j], req_lo[j], req[j]);
        end
      end
    end
    if (hi_cases == 0 || lo_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
