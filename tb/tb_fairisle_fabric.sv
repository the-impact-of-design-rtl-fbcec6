// tb_fairisle_fabric: end-to-end test of the Fairisle 4x4 switch fabric at its
// default size (four byte-wide ports, 5-cycle latency, 5-cycle frame-start
// delay).
//
// The test plays the port controllers. The first frames follow the standard
// frame schedule: a frame start every 64 cycles, the routing tags 5 cycles
// after it, 52 cell bytes after the tags and 5 idle cycles at the end of the
// frame. The later frames vary the header delay (5 to 12 cycles) and the
// frame length (down to the shortest legal frame, 11 cycles, and at least 6
// cycles after the header). Each input sends a cell with random priority and
// route, or none; cell bytes and the output controllers' acknowledgments are
// random every cycle.
//
// A reference model picks the winner of every output on its own (high
// priority first, then round-robin from the input after the last winner) and
// checks every cycle of every frame, with t_s the frame start, t_h the header
// cycle and t_e the next frame start:
//   dout[j] = 0 from t_s+1 to t_h+5
//   dout[j] = din[winner] of 5 cycles before from t_h+6 to t_e, else 0
//   aout[i] = 0 from t_s+1 to t_h+2
//   aout[i] = ain[j] of the output i won, else 0, from t_h+3 to t_e
// It also counts the mechanisms of the fabric (contention, priority override,
// round-robin rotation, negative acknowledgment, a disabled output, a late
// header, a shortest frame) and fails if one never happened.
module tb_fairisle_fabric;
  import fairisle_pkg::*;

  localparam int FRAME_STD = 64;
  localparam int HDR_STD   = 5;
  localparam int CELL      = 52;
  localparam int NFRAMES   = 400;
  localparam int HIST      = 16;

  logic clk = 1'b0, rst = 1'b1, fs = 1'b0;
  byte_t din [PORTS];
  logic [PORTS-1:0] ain = '0;
  byte_t dout [PORTS];
  logic [PORTS-1:0] aout;

  fairisle_fabric dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clash = 0, n_prio = 0, n_rotate = 0, n_nack = 0, n_idle_out = 0;
  int n_late_hdr = 0, n_short = 0, n_ack_pass = 0, n_bytes = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int last [PORTS];            // last winner per output
  int win [PORTS], pwin [PORTS];  // winner per output (-1: none), this and last frame
  int won [PORTS], pwon [PORTS];  // output won per input (-1: none)
  byte_t hd [HIST][PORTS];        // din history
  int t = 0;

  task automatic check_byte(input int j, input byte_t e, input string what);
    checks++;
    if (dout[j] !== e) begin
      failures++;
      if (failures < 20) $display("t=%0d %s: dout[%0d]=%02h expected %02h", t, what, j, dout[j], e);
    end
  endtask

  task automatic check_ack(input int i, input logic e, input string what);
    checks++;
    if (aout[i] !== e) begin
      failures++;
      if (failures < 20) $display("t=%0d %s: aout[%0d]=%0b expected %0b", t, what, i, aout[i], e);
    end
  endtask

  initial begin
    int len, h;
    logic act [PORTS], pri [PORTS];
    int rte [PORTS];
    for (int j = 0; j < PORTS; j++) begin
      din[j] = '0; last[j] = PORTS - 1; win[j] = -1; pwin[j] = -1; won[j] = -1; pwon[j] = -1;
    end
    for (int s = 0; s < HIST; s++) for (int j = 0; j < PORTS; j++) hd[s][j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int f = 0; f < NFRAMES; f++) begin
      if (f < 40) begin
        len = FRAME_STD; h = HDR_STD;
      end else begin
        h = HDR_STD + ($urandom % 8);
        len = h + 6 + ($urandom % 20);
        if ($urandom % 10 == 0) begin h = HDR_STD; len = 11; end
        if (len < 11) len = 11;
      end
      if (h > HDR_STD) n_late_hdr++;
      if (len == 11) n_short++;
      for (int i = 0; i < PORTS; i++) begin
        act[i] = ($urandom % 5 != 0);
        pri[i] = ($urandom % 4 == 0);
        rte[i] = $urandom % PORTS;
      end
      // reference arbitration
      for (int j = 0; j < PORTS; j++) begin pwin[j] = win[j]; pwon[j] = won[j]; won[j] = -1; end
      for (int j = 0; j < PORTS; j++) begin
        logic [PORTS-1:0] hi, lo, rq;
        int nreq;
        hi = '0; lo = '0;
        for (int i = 0; i < PORTS; i++)
          if (act[i] && rte[i] == j) begin if (pri[i]) hi[i] = 1'b1; else lo[i] = 1'b1; end
        rq = (hi != 0) ? hi : lo;
        nreq = $countones(hi | lo);
        if (nreq > 1) n_clash++;
        if (hi != 0 && lo != 0) n_prio++;
        if (nreq == 0) n_idle_out++;
        win[j] = -1;
        for (int k = 1; k <= PORTS; k++)
          if (win[j] < 0 && rq[(last[j] + k) % PORTS]) win[j] = (last[j] + k) % PORTS;
        if (win[j] >= 0) begin
          // a clash won by someone other than the lowest-numbered requester
          if ($countones(rq) > 1) for (int i = 0; i < win[j]; i++) if (rq[i]) begin n_rotate++; break; end
          last[j] = win[j];
          won[win[j]] = j;
        end
      end
      for (int i = 0; i < PORTS; i++) if (act[i] && won[i] < 0) n_nack++;

      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        // drive this cycle
        fs = (k == 0);
        for (int i = 0; i < PORTS; i++) begin
          if (k < h)      din[i] = '0;
          else if (k == h) din[i] = byte_t'(act[i] ? make_tag(1'b1, pri[i], port_t'(rte[i])) : '0);
          else             din[i] = byte_t'($urandom);
          hd[t % HIST][i] = din[i];
        end
        ain = PORTS'($urandom);
        #1;
        // data outputs
        for (int j = 0; j < PORTS; j++) begin
          if (k == 0) begin
            check_byte(j, (f > 0 && pwin[j] >= 0) ? hd[(t - 5) % HIST][pwin[j]] : '0, "tail");
          end else if (k <= h + 5) begin
            check_byte(j, '0, "blank");
          end else begin
            check_byte(j, (win[j] >= 0) ? hd[(t - 5) % HIST][win[j]] : '0, "switch");
            if (win[j] >= 0) n_bytes++;
          end
        end
        // acknowledgments
        for (int i = 0; i < PORTS; i++) begin
          logic e;
          if (k == 0)          e = (pwon[i] >= 0) ? ain[pwon[i]] : 1'b0;
          else if (k <= h + 2) e = 1'b0;
          else                 e = (won[i] >= 0) ? ain[won[i]] : 1'b0;
          if (e) n_ack_pass++;
          check_ack(i, e, k == 0 ? "ack tail" : (k <= h + 2 ? "ack blank" : "ack"));
        end
        t++;
      end
    end

    $display("contention=%0d priority_override=%0d rr_rotation=%0d nack=%0d idle_output=%0d",
             n_clash, n_prio, n_rotate, n_nack, n_idle_out);
    $display("late_header=%0d shortest_frame=%0d acks_passed=%0d bytes_switched=%0d",
             n_late_hdr, n_short, n_ack_pass, n_bytes);
    if (n_clash == 0)    begin failures++; $display("no contention"); end
    if (n_prio == 0)     begin failures++; $display("no priority override"); end
    if (n_rotate == 0)   begin failures++; $display("no round-robin rotation"); end
    if (n_nack == 0)     begin failures++; $display("no negative acknowledgment"); end
    if (n_idle_out == 0) begin failures++; $display("no disabled output"); end
    if (n_late_hdr == 0) begin failures++; $display("no late header"); end
    if (n_short == 0)    begin failures++; $display("no shortest frame"); end
    if (n_ack_pass == 0) begin failures++; $display("no acknowledgment passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
