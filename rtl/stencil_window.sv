// stencil_window: window of the one-dimensional p stream for P parallel pipes.
//
// The 3-D array p (IMAX x JMAX x KMAX, k fastest) arrives as a stream of
// vectors of P consecutive elements. For every element of the centre vector the
// window delivers the 19 points of the Himeno stencil, i.e. the stream elements
// at offsets 0, +-1, +-KMAX, +-JMAX*KMAX and the 12 sums of two of these.
// Each offset is a stream offset: the stream passes a chain of fixed FIFOs
// (delay_line), and every offset taps the chain. An offset that is not a
// multiple of P straddles two vectors, so each offset has two taps one vector
// apart (tap A, and tap B one en-cycle later), and a lane picks its element
// from one of them. The centre vector sits DC vectors behind the input, DC being
// the largest forward offset in vectors. A valid bit travels with each vector.
// Tap A of the largest offset is the input vector itself, so the lanes that use
// it see in_vec directly.
// Interface: in_vec/in_valid are taken when en is high; taps/c_valid describe the
// centre vector and are combinational from the chain's registers.
// Forming the window from stream offsets turned into FIFOs follows the document
// (its Fig. 2); the vector chain with two taps per offset is this design's way
// of serving P pipes at once.
module stencil_window
  import himeno_pkg::*;
#(
  parameter int P    = 48,
  parameter int IMAX = 65,
  parameter int JMAX = 65,
  parameter int KMAX = 129
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic                          in_valid,
  input  logic [P-1:0][31:0]            in_vec,
  output logic                          c_valid,
  output logic [P-1:0][NTAP-1:0][31:0]  taps
);
  localparam int K   = KMAX;
  localparam int JK  = JMAX * KMAX;
  localparam int W   = P * 32 + 1;
  // centre delay in vectors: tap A of the largest forward offset is the input
  localparam int DC  = floor_div(JK + K, P) + 1;

  function automatic int tap_a_delay(int q);
    return DC - floor_div(tap_offset(tap_by_rank(q), JK, K), P) - 1;
  endfunction

  logic [W-1:0] chain [NTAP+1];   // chain[q+1] is tap A of rank q
  logic [W-1:0] tap_b [NTAP];

  assign chain[0] = {in_valid, in_vec};

  for (genvar q = 0; q < NTAP; q++) begin : g_rank
    localparam int SEG = tap_a_delay(q) - ((q == 0) ? 0 : tap_a_delay(q - 1));
    localparam int T   = tap_by_rank(q);
    localparam int O   = tap_offset(T, JK, K);
    localparam int R   = O - floor_div(O, P) * P;   // 0 <= R < P

    delay_line #(.W(W), .DELAY(SEG)) u_seg (
      .clk(clk), .en(en), .din(chain[q]), .dout(chain[q+1])
    );

    always_ff @(posedge clk) if (en) tap_b[q] <= chain[q+1];

    for (genvar l = 0; l < P; l++) begin : g_lane
      if (l + R < P) begin : g_b
        assign taps[l][T] = tap_b[q][(l + R) * 32 +: 32];
      end else begin : g_a
        assign taps[l][T] = chain[q+1][(l + R - P) * 32 +: 32];
      end
    end
  end

  // The centre offset is 0, a multiple of P: every lane reads tap B of rank 9.
  assign c_valid = tap_b[9][W-1];

  initial begin
    assert (KMAX >= 3 && JMAX >= 3 && IMAX >= 3) else $error("stencil_window: grid too small");
    assert (P >= 1 && P <= KMAX) else $error("stencil_window: P must be 1..KMAX");
  end
endmodule
