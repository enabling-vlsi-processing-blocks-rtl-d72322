// One row of the triangular squared-Givens-rotation (SGR) array.
//
// Row IDX of the array keeps row IDX of U = diag(R) [R | Q^T] (2N words,
// the matrix part and the identity/Q part).  Rows v of the augmented input
// [M | I], each with a weight w, reach it one per step of three clocks;
// every row carries its index r.  Following the modes of the paper's PE
// table and the SGR updates (eq. (9)):
//   * r == IDX  (first row to reach this stored row, "boundary" mode):
//        u_j = w v_IDX v_j          -- the stored row is initialised;
//   * r >  IDX  ("internal" mode, diagonal element v_IDX = Y_in, u_IDX = X_in):
//        Reg2   = v_IDX / u_IDX
//        ubar   = u_IDX + w v_IDX^2
//        w'     = w u_IDX / ubar
//        u_j   += w v_IDX v_j
//        v'_j   = v_j - Reg2 u_j  (v'_IDX = 0)
//     and v', w', r go on to the next row of the array.
//
// Timing inside a step (phase from the array, 0..2):
//   phase 0: v, r latched; divider fed v_IDX / u_IDX; w' of the previous
//            row leaves (divider result of the previous step times w);
//   phase 1: w latched; ubar formed; divider fed u_IDX / ubar;
//   phase 2: Reg2 ready; stored row updated; v' registered for the next row.
// The single divider thus overlaps its two divisions so that a row leaves
// after three clocks, as in the paper; w' leaves one clock after v' and is
// needed downstream only from phase 1.
//
// Data words are 7.9 fixed point; w and u/ubar are unsigned 1.15 words.
// The phase plan, the weight format and saturation are this design's
// choices.
module sgr_row_stage
  import mimo_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned IDX = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  phase,
  // from the row above (or the array input)
  input  logic        in_valid,   // sampled in phase 0
  input  logic [3:0]  in_tag,
  input  data_t       in_v [2*N],
  input  logic [15:0] in_w,       // sampled in phase 1
  // to the row below
  output logic        out_valid,  // registered in phase 2
  output logic [3:0]  out_tag,
  output data_t       out_v [2*N],
  output logic [15:0] out_w,      // registered in phase 0
  // stored row and mode events
  output data_t       u [2*N],
  output logic        init_done,  // pulse: boundary-mode update done
  output logic        rot_done    // pulse: internal-mode update done
);

  localparam int unsigned M2 = 2*N;

  data_t       u_q [M2];     // stored row (entries left of IDX stay unused)
  data_t       v_q [M2];
  logic [3:0]  tag_q;
  logic        val_q;
  logic [15:0] w_q;
  logic [15:0] wprev_q;      // weight of the row whose w' is being formed
  logic        wpend_q;
  data_t       ubar_q;
  data_t       reg2;

  // ---- shared divider ----
  logic signed [23:0] dq;
  data_t              dx;
  logic [W-1:0]       dy;
  data_t              ubar_c;

  function automatic data_t sat16(logic signed [47:0] a);
    if (a > 48'sd32767)  return 16'sh7fff;
    if (a < -48'sd32768) return 16'sh8000;
    return a[15:0];
  endfunction

  // w * a * b with w in 1.15 and a, b in 7.9 -> 7.9
  function automatic data_t wprod(logic [15:0] w, data_t a, data_t b);
    logic signed [47:0] p;
    p = (48'(a) * 48'(b)) * 48'(signed'({1'b0, w}));
    return sat16(p >>> (15 + FRAC));
  endfunction

  always_comb begin
    ubar_c = sat16(48'(u[IDX]) + 48'(wprod(in_w, v_q[IDX], v_q[IDX])));   // used in phase 1
    if (phase == 2'd1) begin
      dx = u[IDX];
      dy = ubar_c;
    end else begin
      dx = in_v[IDX];      // phase 0: the row arriving now
      dy = u[IDX];
    end
  end

  sgr_divider #(.W(W), .QW(24), .OUT_FRAC(15)) u_div (
    .clk, .rst_n, .x(dx), .y(dy), .q(dq));

  always_comb begin
    logic signed [23:0] t;
    t    = dq >>> (15 - FRAC);
    reg2 = (t > 24'sd32767) ? 16'sh7fff : (t < -24'sd32768) ? 16'sh8000 : t[15:0];
  end

  // w' = w * u_IDX / ubar  (divider result of the division started in phase 1)
  logic [32:0] wp;
  logic [15:0] wnext;
  always_comb begin
    wp    = 33'(wprev_q) * 33'(dq[16:0] > 17'd32768 ? 17'd32768 : dq[16:0]);
    wnext = wp[30:15];   // product <= 1.0 in 1.15
  end

  for (genvar j = 0; j < M2; j++) begin : g_u
    if (j < IDX) begin : g_zero
      assign u[j] = '0;
    end else begin : g_reg
      assign u[j] = u_q[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_q     <= 1'b0;
      tag_q     <= '0;
      w_q       <= '0;
      wprev_q   <= '0;
      wpend_q   <= 1'b0;
      ubar_q    <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_w     <= '0;
      init_done <= 1'b0;
      rot_done  <= 1'b0;
      for (int j = 0; j < M2; j++) begin
        v_q[j] <= '0; u_q[j] <= '0; out_v[j] <= '0;
      end
    end else begin
      init_done <= 1'b0;
      rot_done  <= 1'b0;
      case (phase)
        2'd0: begin
          val_q     <= in_valid;
          tag_q     <= in_tag;
          v_q       <= in_v;
          out_valid <= 1'b0;
          if (wpend_q) begin
            out_w   <= wnext;
            wpend_q <= 1'b0;
          end
        end
        2'd1: begin
          w_q    <= in_w;
          ubar_q <= ubar_c;
        end
        2'd2: begin
          if (val_q && tag_q == 4'(IDX)) begin
            for (int j = IDX; j < M2; j++) u_q[j] <= wprod(w_q, v_q[IDX], v_q[j]);
            init_done <= 1'b1;
          end else if (val_q && tag_q > 4'(IDX)) begin
            u_q[IDX] <= ubar_q;
            for (int j = IDX + 1; j < M2; j++) begin
              u_q[j]   <= sat16(48'(u[j]) + 48'(wprod(w_q, v_q[IDX], v_q[j])));
              out_v[j] <= sat16(48'(v_q[j]) - ((48'(reg2) * 48'(u[j])) >>> FRAC));
            end
            for (int j = 0; j <= IDX; j++) out_v[j] <= '0;
            out_valid <= 1'b1;
            out_tag   <= tag_q;
            wprev_q   <= w_q;
            wpend_q   <= 1'b1;
            rot_done  <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
