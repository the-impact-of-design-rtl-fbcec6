// tb_fairisle_ack: self-checking test of the acknowledgment unit.
//
// Drives random, consistent grants (a random partial permutation of inputs
// onto outputs) with random disable bits and random acknowledgment inputs.
// The reference: one cycle after a grant is presented, aout[i] is ain[j] for
// the enabled output j that granted input i and 0 otherwise, following ain
// in the same cycle; a frame start blanks aout from the next cycle.
module tb_fairisle_ack;
  localparam int unsigned PORTS = 4;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0;
  logic [1:0] grant [PORTS];
  logic [PORTS-1:0] odis = '1, ain = '0, aout;
  int checks = 0, failures = 0, nacks = 0, passes = 0;

  fairisle_ack #(.PORTS(PORTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] pg [PORTS];
    logic [PORTS-1:0] po;
    logic pfs;
    int perm [PORTS];
    for (int j = 0; j < PORTS; j++) begin grant[j] = '0; pg[j] = '0; perm[j] = j; end
    po = '1; pfs = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // shuffle inputs onto outputs so that grants never collide
      for (int j = PORTS - 1; j > 0; j--) begin
        int s, t;
        s = $urandom % (j + 1);
        t = perm[j]; perm[j] = perm[s]; perm[s] = t;
      end
      // state registered at the last edge came from pg/po/pfs
      for (int m = 0; m < 3; m++) begin
        ain = PORTS'($urandom);
        #1;
        for (int i = 0; i < PORTS; i++) begin
          logic e;
          e = 1'b0;
          for (int j = 0; j < PORTS; j++)
            if (!pfs && !po[j] && pg[j] == 2'(i)) e = ain[j];
          checks++;
          if (e) passes++; else nacks++;
          if (aout[i] !== e) begin
            failures++;
            $display("n=%0d input %0d aout=%0b expected %0b", n, i, aout[i], e);
          end
        end
      end
      for (int j = 0; j < PORTS; j++) grant[j] = 2'(perm[j]);
      odis = PORTS'($urandom);
      fs = ($urandom % 5 == 0);
      for (int j = 0; j < PORTS; j++) pg[j] = grant[j];
      po = odis; pfs = fs;
    end
    if (passes == 0 || nacks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
