// stack2_processor: one processor of the second stack. It runs the part of
// the Level-0 muon algorithm that follows the seed search, for one mu3 seed
// at a time, at its own pace.
//
// For every hit in the mu2 window (seed column +-2, seed row) it forms the
// mu2-mu3 combination, extrapolates the straight line through the two
// points to the mu1 plane, and takes the hit mu1 pad (seed column +-8,
// seed row) closest to that intercept. Of all combinations it keeps the
// one whose mu1 pad is closest to its intercept (first mu2 pad on ties,
// lowest mu1 pad on ties). From the mu1 and mu2 pad centres it computes
// the x and y slopes and the y intercept at the interaction point (z = 0).
// For a track from the target the bend in x is dtheta = tx - x1/z1, the
// momentum is p = PT_KICK / |dtheta| and pt = p * sin(theta) with
// sin(theta) taken as r1/z1, r1 = sqrt(x1^2 + y1^2) at mu1:
//   pt = PT_KICK * r1 / (z1 * |dtheta|).
// The square root and the division are done one bit per clock.
// `y0_ok` is |y0| <= y0_cut_um, `pt_ok` is pt >= pt_min_mev, and `accept`
// needs a combination and both.
//
// Geometry: pads are projective, so the centre of column c in station k is
// x = (c + 1/2 - X_SPAN/2) * PX1_UM * Zk/Z1 (likewise y with rows, Y_SPAN
// and PY1_UM). Extrapolation constants are precomputed in 16-bit fixed
// point; products are 64-bit. Units: um, urad, MeV.
//
// Handshake: `in_ready` is high when idle; a candidate is taken in a clock
// with in_valid && in_ready. `out_valid` is high for one clock, 81 clocks
// after that clock when a combination was found (5 scan, 2 arithmetic,
// 24 square root, 1 set-up, 48 divide, 1 result) and 7 clocks after it
// otherwise (no square root, no divide).
// The steps of the algorithm and the station positions and mu1 pad size
// are the document's; the fixed-point arithmetic, the choice among several
// combinations, the kick constant and the cut values are this design's.
module stack2_processor
  import l0mu_pkg::*;
#(
  parameter int X_SPAN      = 220,    // fine columns across the array
  parameter int Y_SPAN      = 42,     // rows across the array
  parameter int Z1_MM       = 12150,
  parameter int Z2_MM       = 15500,
  parameter int Z3_MM       = 16600,
  parameter int PX1_UM      = 10000,  // mu1 region I pad: 1.0 cm x 2.0 cm
  parameter int PY1_UM      = 20000,
  parameter int PT_KICK_MEV = 1200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cand_t       in_cand,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] pt_min_mev,
  input  logic [31:0] y0_cut_um,
  output result_t     result,
  output logic        out_valid
);
  function automatic longint rdiv(input longint a, input longint b);
    return (a + b / 2) / b;
  endfunction

  localparam longint AQ   =  rdiv(longint'(Z2_MM) * (Z3_MM - Z1_MM) * 65536,
                                  longint'(Z1_MM) * (Z3_MM - Z2_MM));
  localparam longint BQ   = -rdiv(longint'(Z3_MM) * (Z2_MM - Z1_MM) * 65536,
                                  longint'(Z1_MM) * (Z3_MM - Z2_MM));
  localparam longint CX1  = longint'(PX1_UM) * 32768;
  localparam longint CX2  = rdiv(longint'(PX1_UM) * Z2_MM * 32768, Z1_MM);
  localparam longint CY1  = longint'(PY1_UM) * 32768;
  localparam longint CY2  = rdiv(longint'(PY1_UM) * Z2_MM * 32768, Z1_MM);
  localparam longint RZ21 = rdiv(longint'(1000) * 65536, Z2_MM - Z1_MM);
  localparam longint RZ1  = rdiv(longint'(1000) * 65536, Z1_MM);
  localparam longint KZ1  = rdiv(longint'(Z1_MM) * 65536, 1000);
  localparam longint KICK_K = longint'(PT_KICK_MEV) * 1000;  // MeV * (um/mm)

  typedef enum logic [2:0] {IDLE, SCAN, CALC1, CALC2, SQRT, PREP, DIV, DONE} state_t;
  state_t state;

  cand_t         c;
  logic [2:0]    j;
  logic          found;
  logic [4:0]    best_j, best_i;
  longint        best_res;

  // ---- closest mu1 hit to the intercept of combination j (combinational)
  longint hs, h2, h1e, rmin;
  logic [4:0] imin;
  logic       ihit;

  always_comb begin
    hs   = 2 * longint'(c.col) + 1 - X_SPAN;
    h2   = hs + 2 * (longint'(j) - MU2_HX);
    h1e  = h2 * AQ + hs * BQ;
    rmin = 0;
    imin = '0;
    ihit = 1'b0;
    for (int i = 0; i < MU1_WIN; i++) begin
      longint h1, r;
      h1 = hs + 2 * (i - MU1_HX);
      r  = h1 * 65536 - h1e;
      if (r < 0) r = -r;
      if (c.mu1[i] && (!ihit || r < rmin)) begin
        rmin = r;
        imin = 5'(i);
        ihit = 1'b1;
      end
    end
  end

  // ---- slopes and intercepts
  longint x1, x2, y1, y2, tx, ty, th1, dth, y0;
  logic [47:0] den, quo, num;
  logic [48:0] rem;
  logic [5:0]  k;
  logic [47:0] sq_v, sq_res, sq_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      c         <= '0;
      j         <= '0;
      found     <= 1'b0;
      best_j    <= '0;
      best_i    <= '0;
      best_res  <= 0;
      {x1, x2, y1, y2, tx, ty, th1, dth, y0} <= '0;
      den       <= '0;
      num       <= '0;
      sq_v      <= '0;
      sq_res    <= '0;
      sq_bit    <= '0;
      quo       <= '0;
      rem       <= '0;
      k         <= '0;
      result    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        IDLE: if (in_valid) begin
          c     <= in_cand;
          j     <= '0;
          found <= 1'b0;
          state <= SCAN;
        end
        SCAN: begin
          if (c.mu2[j] && ihit && (!found || rmin < best_res)) begin
            found    <= 1'b1;
            best_res <= rmin;
            best_j   <= 5'(j);
            best_i   <= imin;
          end
          j <= j + 3'd1;
          if (j == 3'(MU2_WIN - 1)) state <= CALC1;
        end
        CALC1: begin
          longint hy, h1b, h2b;
          hy  = 2 * longint'(c.row) + 1 - Y_SPAN;
          h2b = hs + 2 * (longint'(best_j) - MU2_HX);
          h1b = hs + 2 * (longint'(best_i) - MU1_HX);
          x1 <= (h1b * CX1) >>> 16;
          x2 <= (h2b * CX2) >>> 16;
          y1 <= (hy * CY1) >>> 16;
          y2 <= (hy * CY2) >>> 16;
          state <= found ? CALC2 : DONE;
        end
        CALC2: begin
          longint t_x, t_y, t_1, d;
          t_x = ((x2 - x1) * RZ21) >>> 16;
          t_y = ((y2 - y1) * RZ21) >>> 16;
          t_1 = (x1 * RZ1) >>> 16;
          d   = t_x - t_1;
          tx  <= t_x;
          ty  <= t_y;
          th1 <= t_1;
          dth <= d;
          y0  <= y1 - ((t_y * KZ1) >>> 16);
          den    <= 48'(longint'(Z1_MM) * ((d < 0) ? -d : d));
          sq_v   <= 48'(x1 * x1 + y1 * y1);
          sq_res <= '0;
          sq_bit <= 48'(1) << 46;
          k      <= '0;
          state  <= SQRT;
        end
        SQRT: begin
          // r1 = floor(sqrt(x1^2 + y1^2)), two bits of the radicand per clock
          if (sq_v >= sq_res + sq_bit) begin
            sq_v   <= sq_v - (sq_res + sq_bit);
            sq_res <= (sq_res >> 1) + sq_bit;
          end else begin
            sq_res <= sq_res >> 1;
          end
          sq_bit <= sq_bit >> 2;
          k <= k + 6'd1;
          if (k == 6'd23) state <= PREP;
        end
        PREP: begin
          num   <= 48'(longint'(sq_res) * KICK_K);
          rem   <= '0;
          quo   <= '0;
          k     <= '0;
          state <= DIV;
        end
        DIV: begin
          // restoring division num / den, one quotient bit per clock
          logic [48:0] r;
          r = {rem[47:0], num[47 - k]};
          if (den != 0 && r >= {1'b0, den}) begin
            rem <= r - {1'b0, den};
            quo <= {quo[46:0], 1'b1};
          end else begin
            rem <= r;
            quo <= {quo[46:0], 1'b0};
          end
          k <= k + 6'd1;
          if (k == 6'd47) state <= DONE;
        end
        DONE: begin
          logic [31:0] pt;
          logic        yok, pok;
          logic [31:0] ay;
          pt  = !found ? '0 : (den == 0 || quo[47:32] != '0) ? '1 : quo[31:0];
          ay  = 32'((y0 < 0) ? -y0 : y0);
          yok = found && (ay <= y0_cut_um);
          pok = found && (pt >= pt_min_mev);
          result.bcid    <= c.bcid;
          result.row     <= c.row;
          result.col     <= c.col;
          result.found   <= found;
          result.mu2_off <= found ? best_j : '0;
          result.mu1_off <= found ? best_i : '0;
          result.tx_urad <= found ? 32'(tx) : '0;
          result.ty_urad <= found ? 32'(ty) : '0;
          result.y0_um   <= found ? 32'(y0) : '0;
          result.pt_mev  <= pt;
          result.y0_ok   <= yok;
          result.pt_ok   <= pok;
          result.accept  <= yok && pok;
          out_valid      <= 1'b1;
          state          <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign in_ready = (state == IDLE);

  logic unused;
  assign unused = ^{th1, dth, rem[48], sq_v, c.triple, c.mu4, c.mu5};
endmodule
