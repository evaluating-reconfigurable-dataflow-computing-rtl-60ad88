// himeno_kernel: the parameterizable multi-pipe Himeno kernel.
//
// One Jacobi sweep over a p array of IMAX x JMAX x KMAX points is a stream of
// NV = ceil(IMAX*JMAX*KMAX / P) vectors of P consecutive elements (k fastest;
// the last vector is padded). The stream passes the stencil window; for the
// window's centre vector, P pipes (stencil_pipe) each compute one point, so the
// kernel retires P points per enabled cycle. An index counter follows the centre
// vector's lane-0 position (i0, j0, k0); each pipe's coeff_gen turns it into its
// own index, boundary flag and coefficients. Streams of several sweeps may
// follow each other without a gap.
// Interface: when en is high the kernel takes in_vec (with in_valid; a
// flush cycle has in_valid = 0) and advances every stage; when en is low it
// holds. out_vec/out_valid is the result vector; it belongs to the input vector
// taken LATENCY en-cycles earlier, LATENCY = DC + pipe latency + 1. After reset
// the first DC en-cycles only fill the window.
// The window, the pipes and the generation of constants from the index follow
// the document; the index counter and the global-enable stall are this
// design's choices.
module himeno_kernel
  import himeno_pkg::*;
#(
  parameter int    P       = 48,
  parameter int    IMAX    = 65,
  parameter int    JMAX    = 65,
  parameter int    KMAX    = 129,
  parameter int    LAT_ADD = 2,
  parameter int    LAT_MUL = 2,
  parameter coef_t COEF    = HIMENO_COEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic [P-1:0][31:0] in_vec,
  output logic               out_valid,
  output logic [P-1:0][31:0] out_vec
);
  localparam int JK = JMAX * KMAX;
  localparam int DC = floor_div(JK + KMAX, P) + 1;
  localparam int IW = $clog2(IMAX + 2);
  localparam int JW = $clog2(JMAX + 1);
  localparam int KW = $clog2(KMAX + 1);
  localparam int CW = $clog2(DC + 2);

  logic                         win_valid;
  logic [P-1:0][NTAP-1:0][31:0] taps;

  stencil_window #(.P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX)) u_win (
    .clk, .en, .in_valid, .in_vec, .c_valid(win_valid), .taps
  );

  // The window's memories start with unknown contents: the centre's valid bit
  // is trusted only once DC vectors have entered since reset.
  logic [CW-1:0] fill;
  logic          primed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               fill <= '0;
    else if (en && !primed)   fill <= fill + 1'b1;
  end
  assign primed = (fill == CW'(DC));

  logic c_valid;
  assign c_valid = win_valid && primed;

  // lane-0 index of the centre vector
  logic [IW-1:0] i0;
  logic [JW-1:0] j0;
  logic [KW-1:0] k0;
  logic [KW:0]   k_next;
  logic          last_vec;
  always_comb begin
    k_next   = {1'b0, k0} + (KW+1)'(P);
    last_vec = (i0 == IW'(IMAX - 1)) && (j0 == JW'(JMAX - 1)) &&
               (k_next >= (KW+1)'(KMAX));
    last_vec = last_vec || (i0 >= IW'(IMAX));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i0 <= '0; j0 <= '0; k0 <= '0;
    end else if (en && c_valid) begin
      if (last_vec) begin
        i0 <= '0; j0 <= '0; k0 <= '0;
      end else if (k_next >= (KW+1)'(KMAX)) begin
        k0 <= KW'(k_next - (KW+1)'(KMAX));
        if (j0 == JW'(JMAX - 1)) begin
          j0 <= '0;
          i0 <= i0 + 1'b1;
        end else begin
          j0 <= j0 + 1'b1;
        end
      end else begin
        k0 <= KW'(k_next);
      end
    end
  end

  logic [P-1:0] lane_valid;
  for (genvar l = 0; l < P; l++) begin : g_pipe
    coef_t         coef;
    logic          interior;
    logic [IW-1:0] li;
    logic [JW-1:0] lj;
    logic [KW-1:0] lk;
    coeff_gen #(.IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX), .LANE(l), .COEF(COEF)) u_cg (
      .i0, .j0, .k0, .i(li), .j(lj), .k(lk), .interior, .coef
    );
    stencil_pipe #(.LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL)) u_pipe (
      .clk, .rst_n, .en, .valid(c_valid), .taps(taps[l]), .coef, .interior,
      .y_valid(lane_valid[l]), .y(out_vec[l])
    );
  end
  assign out_valid = lane_valid[0];

  initial assert (P <= KMAX) else $error("himeno_kernel: P must not exceed KMAX");
endmodule
