// tb_stencil_window: checks every tap of every lane against stream offsets.
//
// A small grid (4 x 4 x 5, so JK = 20, K = 5) and P = 3 lanes, so most offsets
// straddle two vectors. Element g of the stream (counting every vector taken,
// valid or not) carries g + 1 in a valid vector and 0 in a flush vector; runs
// of valid vectors alternate with flush vectors and stall cycles. For each
// valid centre vector c the window must show, for lane l and tap T, the value
// of element c*P + l + offset(T), and its valid bit must be that of the vector
// taken DC vectors earlier, DC = floor((JK + K) / P) + 1. The window is first
// filled with DC invalid vectors so that no start-up contents are checked.
module tb_stencil_window;
  import himeno_pkg::*;
  localparam int P = 3, IMAX = 4, JMAX = 4, KMAX = 5;
  localparam int JK = JMAX * KMAX, K = KMAX;
  localparam int DC = (JK + K) / P + 1;

  logic clk = 0, en, in_valid, c_valid;
  logic [P-1:0][31:0] in_vec;
  logic [P-1:0][NTAP-1:0][31:0] taps;
  int checks = 0, failures = 0;

  stencil_window #(.P(P), .IMAX(IMAX), .JMAX(JMAX), .KMAX(KMAX)) dut (.*);
  always #5 clk = ~clk;

  // reference offsets, written out from the stencil's definition
  function automatic int offs(int t);
    int di, dj, dk;
    di = 0; dj = 0; dk = 0;
    case (t)
      1: di = 1;  2: dj = 1;  3: dk = 1;  4: di = -1;  5: dj = -1;  6: dk = -1;
      7: begin di = 1; dj = 1; end     8: begin di = 1; dj = -1; end
      9: begin di = -1; dj = 1; end    10: begin di = -1; dj = -1; end
      11: begin dj = 1; dk = 1; end    12: begin dj = -1; dk = 1; end
      13: begin dj = 1; dk = -1; end   14: begin dj = -1; dk = -1; end
      15: begin di = 1; dk = 1; end    16: begin di = -1; dk = 1; end
      17: begin di = 1; dk = -1; end   18: begin di = -1; dk = -1; end
      default: ;
    endcase
    return di * JK + dj * K + dk;
  endfunction

  // valid bit of every vector taken so far
  bit  vval[$];
  int  valid_centres = 0;

  initial begin
    en = 0; in_valid = 0; in_vec = '0;
    // fill
    for (int n = 0; n < DC + 1; n++) begin
      @(negedge clk); en = 1; in_valid = 0; in_vec = '0;
      @(posedge clk); vval.push_back(0);
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      in_valid = (n % 50) < 40;                 // runs of data, then flush
      for (int l = 0; l < P; l++) in_vec[l] = in_valid ? 32'(vval.size() * P + l + 1) : 32'd0;
      // check the centre before the edge: it is combinational from the chain
      #1;
      if (vval.size() >= DC) begin
        int ci;
        ci = vval.size() - DC;            // index of the centre vector
        checks++;
        if (c_valid !== vval[ci]) begin
          failures++;
          $display("ERROR: c_valid %b expected %b at vector %0d", c_valid, vval[ci], ci);
        end
        if (vval[ci]) begin
          valid_centres++;
          for (int l = 0; l < P; l++)
            for (int t = 0; t < NTAP; t++) begin
              int g;
              g = ci * P + l + offs(t);
              // only elements already taken after the fill
              if (g >= (DC + 1) * P && g < vval.size() * P) begin
                checks++;
                if (taps[l][t] !== (vval[g / P] ? 32'(g + 1) : 32'd0)) begin
                  failures++;
                  if (failures < 10)
                    $display("ERROR: lane %0d tap %0d got %0d expected %0d", l, t, taps[l][t], g + 1);
                end
              end
            end
        end
      end
      @(posedge clk);
      if (en) begin
        vval.push_back(in_valid);
      end
    end
    if (valid_centres < 100) begin
      failures++;
      $display("ERROR: only %0d valid centres", valid_centres);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
