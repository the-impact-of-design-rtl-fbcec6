// tb_fairisle_properties: the four switching properties of the cleaned fabric,
// checked in simulation on the fabric driven by the 64-state frame-timing
// model of the port controllers (fairisle_env).
//
// As in a property-checking set-up, a five-stage shift register keeps the
// input bytes of the last five cycles so that outputs can be compared with
// the inputs that produced them. With s the state of the timing model:
//   P1  s in 6..11                      -> dout[j] = 0 for every j
//   P2  s in 2..8                       -> aout[i] = 0 for every i
//   P3  s in 12..63, input i alone has
//       its priority bit set, route j   -> dout[j] = din[i] of 5 cycles ago
//   P4  s in 9..63, same condition      -> aout[i] = ain[j]
// P3 and P4 are checked for every pair (i, j), not only for input 0 and
// output 0. Every property must have been exercised; each check counts.
module tb_fairisle_properties;
  import fairisle_pkg::*;

  localparam int NFRAMES = 300;

  logic clk = 1'b0, rst = 1'b1;
  logic fs, hdr, data;
  int   state;
  byte_t din [PORTS];
  logic [PORTS-1:0] ain = '0;
  byte_t dout [PORTS];
  logic [PORTS-1:0] aout;

  fairisle_env #(.MAX_WAIT(3)) env (.clk, .rst, .fs, .hdr, .state, .data);
  fairisle_fabric dut (.clk, .rst, .fs, .din, .ain, .dout, .aout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frames = 0;
  int n_p1 = 0, n_p2 = 0, n_p3 = 0, n_p4 = 0;

  initial begin
    repeat (NFRAMES * 70 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // five-stage delay of the input bytes
  byte_t dly [5][PORTS];
  always_ff @(posedge clk) begin
    dly[0] <= din;
    for (int k = 1; k < 5; k++) dly[k] <= dly[k-1];
  end

  // tags of the current frame
  tag_t tags [PORTS];
  int   prio_in;   // the single input with its priority bit set, or -1

  // drive the links from the timing model, after each rising edge
  always @(negedge clk) begin
    for (int i = 0; i < PORTS; i++) begin
      if (hdr) begin
        din[i] = byte_t'(tags[i]);
      end else if (data) din[i] = byte_t'($urandom);
      else din[i] = '0;
    end
    ain = PORTS'($urandom);
  end

  // new tags for each frame, drawn at the frame start
  always @(negedge clk) begin
    if (fs) begin
      int p;
      p = ($urandom % 4 != 0) ? int'($urandom % PORTS) : -1;
      for (int i = 0; i < PORTS; i++)
        tags[i] = make_tag($urandom % 5 != 0, (i == p) || ($urandom % 8 == 0), port_t'($urandom));
      prio_in = -1;
      for (int i = 0; i < PORTS; i++)
        if (tags[i].active && tags[i].prio) prio_in = (prio_in == -1) ? i : -2;
      frames++;
    end
  end

  task automatic fail(input string what, input int i);
    failures++;
    if (failures < 20) $display("state %0d: %s (port %0d)", state, what, i);
  endtask

  // check just before each rising edge, when inputs and outputs are settled
  always @(posedge clk) if (!rst) begin
    if (state >= 6 && state <= 11) begin
      n_p1++;
      for (int j = 0; j < PORTS; j++) begin checks++; if (dout[j] !== '0) fail("P1", j); end
    end
    if (state >= 2 && state <= 8) begin
      n_p2++;
      for (int i = 0; i < PORTS; i++) begin checks++; if (aout[i] !== 1'b0) fail("P2", i); end
    end
    if (prio_in >= 0) begin
      int j;
      j = int'(tags[prio_in].route);
      if (state >= 12 && state <= 63) begin
        n_p3++; checks++;
        if (dout[j] !== dly[4][prio_in]) fail("P3", j);
      end
      if (state >= 9 && state <= 63) begin
        n_p4++; checks++;
        if (aout[prio_in] !== ain[j]) fail("P4", prio_in);
      end
    end
  end

  initial begin
    prio_in = -1;
    for (int i = 0; i < PORTS; i++) begin tags[i] = '0; din[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (frames == NFRAMES);
    $display("frames=%0d P1=%0d P2=%0d P3=%0d P4=%0d cycles under each", frames, n_p1, n_p2, n_p3, n_p4);
    if (n_p1 == 0 || n_p2 == 0 || n_p3 == 0 || n_p4 == 0) begin
      failures++;
      $display("a property was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
