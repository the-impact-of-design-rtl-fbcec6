// tb_fairisle_equiv: cycle-by-cycle comparison of the RTL fabric with the
// 12-state behavioural specification (fairisle_spec), both driven by the
// 64-state frame-timing model of the port controllers (fairisle_env).
//
// Every cycle after reset, all four data outputs and all four acknowledgment
// outputs of the two must be equal. Tags are random (activity, priority and
// route), cell bytes and acknowledgments are random, and the header may wait
// in the header window. The test also counts frames with contention for an
// output and with a priority override, and fails if there were none.
module tb_fairisle_equiv;
  import fairisle_pkg::*;

  localparam int NFRAMES = 300;

  logic clk = 1'b0, rst = 1'b1;
  logic fs, hdr, data;
  int   state;
  byte_t din [PORTS];
  logic [PORTS-1:0] ain = '0;
  byte_t dout [PORTS], sdout [PORTS];
  logic [PORTS-1:0] aout, saout;

  fairisle_env #(.MAX_WAIT(4)) env (.clk, .rst, .fs, .hdr, .state, .data);
  fairisle_fabric dut (.clk, .rst, .fs, .din, .ain, .dout, .aout);
  fairisle_spec #(.PORTS(PORTS), .WIDTH(WIDTH)) spec (.clk, .rst, .fs, .din, .ain, .dout(sdout), .aout(saout));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frames = 0, clashes = 0, overrides = 0;

  initial begin
    repeat (NFRAMES * 70 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tag_t tags [PORTS];

  always @(negedge clk) begin
    if (fs) begin
      int cnt [PORTS], hi [PORTS];
      for (int j = 0; j < PORTS; j++) begin cnt[j] = 0; hi[j] = 0; end
      for (int i = 0; i < PORTS; i++) begin
        tags[i] = make_tag($urandom % 5 != 0, $urandom % 4 == 0, port_t'($urandom));
        if (tags[i].active) begin
          cnt[tags[i].route]++;
          if (tags[i].prio) hi[tags[i].route]++;
        end
      end
      for (int j = 0; j < PORTS; j++) begin
        if (cnt[j] > 1) clashes++;
        if (hi[j] > 0 && hi[j] < cnt[j]) overrides++;
      end
      frames++;
    end
    for (int i = 0; i < PORTS; i++)
      if (hdr) din[i] = byte_t'(tags[i]);
      else if (data) din[i] = byte_t'($urandom);
      else din[i] = '0;
    ain = PORTS'($urandom);
  end

  always @(posedge clk) if (!rst) begin
    for (int j = 0; j < PORTS; j++) begin
      checks += 2;
      if (dout[j] !== sdout[j] || aout[j] !== saout[j]) begin
        failures++;
        if (failures < 20)
          $display("state %0d port %0d: rtl dout=%02h aout=%0b, spec dout=%02h aout=%0b",
                   state, j, dout[j], aout[j], sdout[j], saout[j]);
      end
    end
  end

  initial begin
    for (int i = 0; i < PORTS; i++) begin tags[i] = '0; din[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (frames == NFRAMES);
    $display("frames=%0d contention=%0d priority_override=%0d", frames, clashes, overrides);
    if (clashes == 0 || overrides == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
