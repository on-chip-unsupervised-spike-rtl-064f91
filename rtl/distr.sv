// DISTR: feature-distribution memory and its controllers.
//
// Holds the 64-bin histogram shared by both features (distr_mem), the
// informative-sample mask (fis_mem), the boundary registers (segs_mem) and the
// two controllers that fill them. Commands are one-cycle strobes accepted only
// in IDLE; each ends in FIN, where fin stays high until a bus read (read) sends
// the controller back to IDLE.
//
//   ker     - histogram update: read/write the peak bin (count+1), then the
//             hyperpolarisation bin: 2 read/write pairs, 4 cycles, then FIN.
//             When a read count is within one of full scale, the value written
//             is full scale and an overflow pass follows: all DEPTH bins are
//             read and written back halved (DEPTH read/write pairs), after which
//             a pending hyperpolarisation update is completed. Halving keeps
//             the estimate and gives recent spikes more weight.
//   laplace - one read per bin, bin 0 upward, DEPTH+2 cycles. A three-word
//             window feeds laplace_cmp; each bin's informative bit is shifted
//             into the mask and also drives boundary_fsm, whose boundaries go
//             into the boundary registers (cleared when the pass starts). Bins
//             outside the memory count as 0.
//   clear   - writes 0 to every bin, DEPTH cycles.
//
// The feature pair is captured when a command is accepted. infm, boundary and
// bvalid are read combinationally by the grid/cluster logic. The command set,
// the 4-cycle update, the overflow halving, FIN-until-read and the Laplace test
// follow the original design; resuming the second update after an overflow,
// clearing the boundaries per pass and the exact state sequence are this
// implementation's choices. Everything runs on the rising clock edge.
module distr
#(
  parameter int unsigned DEPTH      = spks_pkg::DEPTH,
  parameter int unsigned CNT_W      = spks_pkg::CNT_W,
  parameter int unsigned NB         = spks_pkg::NB,
  parameter int unsigned LAP_OFFSET = spks_pkg::LAP_OFFSET,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  clear,
  input  logic                  ker,
  input  logic                  laplace,
  input  logic                  read,
  input  logic [AW-1:0]         feat_p,
  input  logic [AW-1:0]         feat_h,
  output logic                  fin,
  output logic                  busy,
  output logic                  overflow,   // pulses when an overflow pass starts
  output logic                  infm,
  output logic [DEPTH-1:0]      mask,
  output logic [NB-1:0][AW-1:0] boundary,
  output logic [NB-1:0]         bvalid
);

  typedef enum logic [3:0] {
    IDLE, RD_P, WR_P, RD_H, WR_H, OVF_RD, OVF_WR, CLR, LAP, FIN
  } d_state_t;

  d_state_t         state;
  logic [AW:0]      roll;            // traversal counter (LAP runs to DEPTH+1)
  logic             resume_h;        // hyperpolarisation update still pending
  logic [AW-1:0]    fp_q, fh_q;      // captured feature pair
  logic [CNT_W-1:0] prv2, prv1;      // Laplace window F(i-1), F(i)

  // memory port
  logic             m_rd, m_wr;
  logic [AW-1:0]    m_addr;
  logic [CNT_W-1:0] m_wdata, m_rdata;
  logic             near_full;

  // Laplace datapath
  logic [CNT_W-1:0] incoming;
  logic             in_is, lap_valid, lap_last, lap_start;
  logic             push_seg;
  logic [AW-1:0]    seg_bound;

  distr_mem #(.DEPTH(DEPTH), .CNT_W(CNT_W)) u_mem (
    .clk, .rd(m_rd), .wr(m_wr), .addr(m_addr), .wr_data(m_wdata), .rd_data(m_rdata)
  );

  assign near_full = &m_rdata[CNT_W-1:1];

  always_comb begin
    m_rd    = 1'b0;
    m_wr    = 1'b0;
    m_addr  = roll[AW-1:0];
    m_wdata = m_rdata + 1'b1;
    unique case (state)
      RD_P:   begin m_rd = 1'b1; m_addr = fp_q; end
      WR_P:   begin m_wr = 1'b1; m_addr = fp_q; end
      RD_H:   begin m_rd = 1'b1; m_addr = fh_q; end
      WR_H:   begin m_wr = 1'b1; m_addr = fh_q; end
      OVF_RD: m_rd = 1'b1;
      OVF_WR: begin m_wr = 1'b1; m_wdata = m_rdata >> 1; end
      CLR:    begin m_wr = 1'b1; m_wdata = '0; end
      LAP:    m_rd = (roll < (AW+1)'(DEPTH));
      default: ;
    endcase
  end

  // Laplace window: in cycle roll=c the memory returns F(c-1); the bin under
  // test is c-2 and sits in prv1.
  assign incoming  = (state == LAP && roll >= 1 && roll <= (AW+1)'(DEPTH)) ? m_rdata : '0;
  assign lap_valid = (state == LAP) && (roll >= 2);
  assign lap_last  = (state == LAP) && (roll == (AW+1)'(DEPTH + 1));
  assign lap_start = (state == IDLE) && !clear && !ker && laplace;

  laplace_cmp #(.CNT_W(CNT_W), .LAP_OFFSET(LAP_OFFSET)) u_lap (
    .f_prev(prv2), .f_cur(prv1), .f_next(incoming), .informative(in_is)
  );

  boundary_fsm #(.CNT_W(CNT_W), .AW(AW)) u_bfsm (
    .clk, .reset, .start(lap_start), .sample_valid(lap_valid), .sample_last(lap_last),
    .in_is, .count(prv1), .loc(AW'(roll - 2)), .push_seg, .bound(seg_bound), .busy()
  );

  fis_mem #(.DEPTH(DEPTH)) u_fis (
    .clk, .reset, .push(lap_valid), .in(in_is), .addr_p(feat_p), .addr_h(feat_h),
    .infm, .mask
  );

  segs_mem #(.NB(NB), .AW(AW)) u_segs (
    .clk, .reset, .clear(lap_start), .push(push_seg), .in(seg_bound),
    .boundary, .valid(bvalid)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= IDLE;
      roll     <= '0;
      resume_h <= 1'b0;
      fp_q     <= '0;
      fh_q     <= '0;
      prv1     <= '0;
      prv2     <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          roll <= '0;
          prv1 <= '0;
          prv2 <= '0;
          fp_q <= feat_p;
          fh_q <= feat_h;
          if (clear)        state <= CLR;
          else if (ker)     state <= RD_P;
          else if (laplace) state <= LAP;
        end
        RD_P: state <= WR_P;
        WR_P: if (near_full) begin
                state    <= OVF_RD;
                resume_h <= 1'b1;
              end else state <= RD_H;
        RD_H: state <= WR_H;
        WR_H: if (near_full) begin
                state    <= OVF_RD;
                resume_h <= 1'b0;
              end else state <= FIN;
        OVF_RD: state <= OVF_WR;
        OVF_WR: begin
          roll <= roll + 1'b1;
          if (roll == (AW+1)'(DEPTH - 1)) begin
            roll  <= '0;
            state <= resume_h ? RD_H : FIN;
          end else state <= OVF_RD;
        end
        CLR: begin
          roll <= roll + 1'b1;
          if (roll == (AW+1)'(DEPTH - 1)) state <= FIN;
        end
        LAP: begin
          roll <= roll + 1'b1;
          if (roll >= 1) begin
            prv2 <= prv1;
            prv1 <= incoming;
          end
          if (lap_last) state <= FIN;
        end
        FIN: if (read) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign fin      = (state == FIN);
  assign busy     = (state != IDLE);
  assign overflow = (state == WR_P || state == WR_H) && near_full;

endmodule
