// fairisle_spec: behavioural specification of the cleaned Fairisle 4x4 fabric
// as a 12-state abstract state machine, used as the reference in simulation
// (not synthesizable logic, and independent of the block structure of the
// RTL).
//
//   S1          wait for the first frame start                 outputs 0
//   S2..S5      the four cycles after a frame start            outputs 0
//   S6          wait for the headers (any active bit); on them
//               arbitrate: high priority first, then round-robin
//               from the input after each output's last winner  outputs 0
//   S7, S8      arbitration and switching delay                outputs 0
//   S9..S11     acknowledgments: aout[i] = ain[j] if input i
//               won output j, else 0                            dout 0
//   S12         acknowledgments and data: dout[j] = din of the
//               winner 5 cycles earlier, else 0; loops until a
//               frame start, then goes to S2
// It has the same ports as the RTL fabric, and its outputs are combinational
// in the state and the inputs.
module fairisle_spec #(
  parameter int PORTS = 4,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             fs,
  input  logic [WIDTH-1:0] din  [PORTS],
  input  logic [PORTS-1:0] ain,
  output logic [WIDTH-1:0] dout [PORTS],
  output logic [PORTS-1:0] aout
);

  typedef enum int {S1 = 1, S2, S3, S4, S5, S6, S7, S8, S9, S10, S11, S12} state_t;

  state_t st;
  int last [PORTS];
  int win  [PORTS];
  logic [WIDTH-1:0] past [5][PORTS];   // past[k] = din of k+1 cycles ago
  logic h;

  always_comb begin
    h = 1'b0;
    for (int i = 0; i < PORTS; i++) h |= din[i][0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S1;
      for (int j = 0; j < PORTS; j++) begin last[j] <= PORTS - 1; win[j] <= -1; end
      for (int k = 0; k < 5; k++) for (int i = 0; i < PORTS; i++) past[k][i] <= '0;
    end else begin
      past[0] <= din;
      for (int k = 1; k < 5; k++) past[k] <= past[k-1];
      case (st)
        S1:  if (fs) st <= S2;
        S6:  if (h) begin
               // r: arbitration on the headers now on the links
               for (int j = 0; j < PORTS; j++) begin
                 bit any_hi;
                 int w;
                 any_hi = 1'b0;
                 for (int i = 0; i < PORTS; i++)
                   if (din[i][0] && din[i][1] && din[i][3:2] == 2'(j)) any_hi = 1'b1;
                 w = -1;
                 for (int k = 1; k <= PORTS; k++) begin
                   int c;
                   c = (last[j] + k) % PORTS;
                   if (w < 0 && din[c][0] && din[c][3:2] == 2'(j) && (din[c][1] || !any_hi)) w = c;
                 end
                 win[j] <= w;
                 if (w >= 0) last[j] <= w;
               end
               st <= S7;
             end
        S12: if (fs) st <= S2;
        default: st <= state_t'(int'(st) + 1);
      endcase
    end
  end

  always_comb begin
    aout = '0;
    for (int j = 0; j < PORTS; j++) dout[j] = '0;
    if (st >= S9)
      for (int j = 0; j < PORTS; j++)
        if (win[j] >= 0) aout[win[j]] = ain[j];
    if (st == S12)
      for (int j = 0; j < PORTS; j++)
        if (win[j] >= 0) dout[j] = past[4][win[j]];
  end

endmodule
