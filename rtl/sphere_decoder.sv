// Depth-first sphere decoder for real-valued MIMO lattices (Z8 or E8).
//
// Solves  s^ = argmin ||y~ - R s||^2  over s in (Q-PAM)^N for an upper-
// triangular R with positive diagonal, by a Schnorr-Euchner depth-and-best-
// first traversal of an N-level tree whose root is dimension N-1.  The
// modulation (4-, 16- or 64-QAM, i.e. 2-, 4- or 8-PAM per real dimension)
// is chosen per decode with `mode`.
//
// Per level the decoder keeps a memory of psi (the interference-cancelled
// received value), of the parent metric T, of the current symbol and of the
// zig-zag state (highest/lowest visited point and next side).  Each clock in
// SEARCH scores one node with metric_compute:
//   * T < radius and not a leaf: descend; u_psi_unit forms psi of the child
//     and its nearest PAM point by successive subtraction (no divider);
//   * T < radius at a leaf: new best point, radius := T, then go up;
//   * T >= radius: prune, go up.
// "Going up" takes the alternative node of the parent level, which
// u_psi_step_unit has ready in the same cycle (eq. (7)), so a pruned branch
// costs no extra clock.  Only a level whose zig-zag has left the
// constellation costs one idle clock (POP).  The search ends when the root
// level is exhausted.  The first leaf reached with an infinite radius is the
// ZF-DFE (Babai) point, which sets the first finite radius.
//
// With e8_en = 1 (N must be 8) the constraint_maker restricts levels 4, 2,
// 1, 0 to the PAM sub-set required by the extended Hamming code, so only
// points of the coset cbar + E8 are visited and `metric` is the branch metric
// of that coset.
//
// Interface: r and y are sampled when start is high in IDLE; done pulses for
// one clock with found, s_hat and metric valid until the next start.  nodes
// counts scored nodes, pops the idle clocks, prunes the pruned nodes and
// leaves the radius updates; cycles counts clocks from start to done.
//
// U_psi and Metric_Compute form two pipelined steps joined by the psi
// memory: in the clock in which metric_compute scores a node from the psi
// stored one clock earlier, u_psi_unit already prepares psi and the first
// symbol of that node's child, which are written only if the node survives.
//
// Parameters: N is the number of tree levels (real dimensions), DW the
// data word width, FW its fraction bits (also those of the metrics) and TW
// the metric width; the defaults are the 16-bit 7.9 words of mimo_pkg.
//
// Follows the paper: division-based first choice, zig-zag alternative
// selection, the two-step U_psi / Metric_Compute split with psi and T
// memories, one metric per clock, 16-bit data, and the number of levels
// and the datapath width as instance parameters.  This design's choices:
// the idle clock for an exhausted level, metric width and saturation, and
// the handshake.
module sphere_decoder
  import mimo_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = W,      // data word width
  parameter int unsigned FW = FRAC,   // fraction bits of data and metric
  parameter int unsigned TW = MW      // metric width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  qam_e          mode,
  input  logic          e8_en,
  input  logic [7:0]    cbar,
  input  logic [TW-1:0] radius_init,
  input  logic signed [DW-1:0] r [N][N],
  input  logic signed [DW-1:0] y [N],
  output logic          busy,
  output logic          done,
  output logic          found,
  output sym_t          s_hat [N],
  output logic [TW-1:0] metric,
  output logic [15:0]   nodes,
  output logic [15:0]   pops,
  output logic [15:0]   prunes,
  output logic [15:0]   leaves,
  output logic [15:0]   cycles
);

  localparam int unsigned LW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SEARCH, S_POP, S_DONE} state_e;
  state_e state;

  logic signed [DW-1:0] r_q [N][N];
  logic signed [DW-1:0] y_q [N];
  qam_e    mode_q;
  logic    e8_q;
  logic [7:0] cbar_q;

  sym_t    s_q    [N];
  sym_t    hi_q   [N];
  sym_t    lo_q   [N];
  logic    dir_q  [N];
  logic    cons_q [N];
  logic signed [DW-1:0] psi_mem [N];
  logic [TW-1:0] t_mem   [N];
  logic [TW-1:0] radius;
  logic [LW-1:0] cur;

  // ---- child level: psi, first candidate, constraint -------------------
  logic [LW-1:0] d;
  logic [N-1:0]  mask;
  logic signed [DW-1:0] psi_c;
  sym_t          s_first;
  logic          dir_first;
  logic          forced, req_class;

  always_comb begin
    d = (state == S_INIT) ? LW'(N-1) : cur - LW'(1);
    for (int j = 0; j < N; j++) mask[j] = (j > int'(d));
  end

  generate
    if (N == 8) begin : g_e8
      sym_t s8 [8];
      always_comb for (int j = 0; j < 8; j++) s8[j] = s_q[j];
      constraint_maker u_cm (
        .e8_en(e8_q), .cbar(cbar_q), .s(s8), .level(3'(d)),
        .forced(forced), .req_class(req_class));
    end else begin : g_z
      assign forced    = 1'b0;
      assign req_class = 1'b0;
    end
  endgenerate

  u_psi_unit #(.N(N), .DW(DW)) u_psi (
    .y_d(y_q[d]), .r_row(r_q[d]), .s(s_q), .sel_mask(mask), .r_dd(r_q[d][d]),
    .mode(mode_q), .forced(forced), .req_class(req_class),
    .psi(psi_c), .s_first(s_first), .dir_up(dir_first));

  // ---- current node metric ---------------------------------------------
  logic [TW-1:0] t_node;
  metric_compute #(.DW(DW), .FW(FW), .TW(TW)) u_mc (
    .t_parent(t_mem[cur]), .psi(psi_mem[cur]), .r_ll(r_q[cur][cur]), .s(s_q[cur]),
    .t_node(t_node));

  // ---- alternative node of the parent level -----------------------------
  logic [LW-1:0] p;
  logic          top;       // current level is the root: nothing above
  logic          alt_valid, alt_dir;
  sym_t          alt_s, alt_hi, alt_lo;

  assign top = (cur == LW'(N-1));
  assign p   = top ? cur : cur + LW'(1);

  u_psi_step_unit u_step (
    .hi(hi_q[p]), .lo(lo_q[p]), .dir_up(dir_q[p]), .constrained(cons_q[p]),
    .mode(mode_q), .valid(alt_valid), .s_next(alt_s), .hi_next(alt_hi),
    .lo_next(alt_lo), .dir_next(alt_dir));

  // ---- control ----------------------------------------------------------
  // go_up: leave the current level for the alternative node of its parent
  // (after a prune, a new best leaf or an exhausted level).
  logic go_up;
  assign go_up = (state == S_POP) || !(t_node < radius) || (cur == '0);

  assign busy = (state != S_IDLE) && (state != S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      found  <= 1'b0;
      metric <= '0;
      radius <= '0;
      cur    <= '0;
      nodes  <= '0;
      pops   <= '0;
      prunes <= '0;
      leaves <= '0;
      cycles <= '0;
      mode_q <= QAM4;
      e8_q   <= 1'b0;
      cbar_q <= '0;
      for (int i = 0; i < N; i++) begin
        s_hat[i]   <= '0;
        s_q[i]     <= '0;
        hi_q[i]    <= '0;
        lo_q[i]    <= '0;
        dir_q[i]   <= 1'b0;
        cons_q[i]  <= 1'b0;
        psi_mem[i] <= '0;
        t_mem[i]   <= '0;
        y_q[i]     <= '0;
        for (int j = 0; j < N; j++) r_q[i][j] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 16'd1;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            r_q    <= r;
            y_q    <= y;
            mode_q <= mode;
            e8_q   <= e8_en;
            cbar_q <= cbar;
            radius <= radius_init;
            found  <= 1'b0;
            nodes  <= '0;
            pops   <= '0;
            prunes <= '0;
            leaves <= '0;
            cycles <= 16'd1;
            for (int i = 0; i < N; i++) s_q[i] <= '0;
            state  <= S_INIT;
          end
        end
        S_INIT: begin
          cur             <= LW'(N-1);
          s_q[N-1]        <= s_first;
          hi_q[N-1]       <= s_first;
          lo_q[N-1]       <= s_first;
          dir_q[N-1]      <= dir_first;
          cons_q[N-1]     <= forced;
          psi_mem[N-1]    <= psi_c;
          t_mem[N-1]      <= '0;
          state           <= S_SEARCH;
        end
        S_SEARCH, S_POP: begin
          if (state == S_SEARCH) begin
            nodes <= nodes + 16'd1;
            if (t_node < radius) begin
              if (cur == '0) begin
                radius <= t_node;
                metric <= t_node;
                found  <= 1'b1;
                leaves <= leaves + 16'd1;
                for (int i = 0; i < N; i++) s_hat[i] <= s_q[i];
              end else begin
                cur        <= d;
                s_q[d]     <= s_first;
                hi_q[d]    <= s_first;
                lo_q[d]    <= s_first;
                dir_q[d]   <= dir_first;
                cons_q[d]  <= forced;
                psi_mem[d] <= psi_c;
                t_mem[d]   <= t_node;
              end
            end else begin
              prunes <= prunes + 16'd1;
            end
          end else begin
            pops <= pops + 16'd1;
          end
          if (go_up) begin
            if (top) begin
              state <= S_DONE;
              done  <= 1'b1;
            end else begin
              cur <= p;
              if (alt_valid) begin
                s_q[p]   <= alt_s;
                hi_q[p]  <= alt_hi;
                lo_q[p]  <= alt_lo;
                dir_q[p] <= alt_dir;
                state    <= S_SEARCH;
              end else begin
                state    <= S_POP;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
