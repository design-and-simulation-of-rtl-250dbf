// symbol_mapper: bit-to-symbol mapper (MBIT2symbol) of the generalized modulator.
//
// Consumes NRZ levels d and produces complex symbols on two streams, one per branch
// (I and Q). The mode is cfg.mod_num:
//   1 GMSK (linearised): one level per symbol, Z_k = j^k * d_k * AMP. k counts the
//     symbols of the burst from 0, which together with the differential precoder
//     gives the linear (Laurent main pulse) form of GMSK.
//   2 pi/4-DQPSK: two bits per symbol; the phase advances by +pi/4 (00), +3pi/4 (01),
//     -3pi/4 (11) or -pi/4 (10) from a phase of 0 at the start of the burst.
//   3 QPSK: two bits per symbol, Gray coded, first bit sets the sign of I, second of Q.
//   4 with cfg.i_len = 0: 8PSK, three bits per symbol, Gray coded
//     (111,011,010,000,001,101,100,110 -> phase 0, pi/4, ..., 7pi/4).
//   4 with cfg.i_len > 0: dual QPSK for the UTRA-FDD uplink. The first i_len levels of
//     a burst go to the I branch (DPDCH) and the next q_len levels to the Q branch
//     (DPCCH), as real values d*AMP. Both branches are stored in branch buffers and,
//     once cfg.burst_len levels have arrived, read out on the two streams
//     independently, so the spreader can run them at different spreading factors.
//     The input is held off while a burst is read out (single buffering, own choice).
// For modes 2, 3 and 4 a level is read as a bit by its sign (bit 1 <-> d = -1); with
// NRZ off, the level itself (0/1) is the bit. Symbol points lie on a circle of radius
// AMP at multiples of pi/8 (sdr_pkg::phase_point). The burst is found by counting
// levels against cfg.burst_len; the memory of GMSK and pi/4-DQPSK restarts with it.
// Interface: valid/ready in; two valid/ready outputs. In modes 1-4(8PSK) a symbol is
// offered on both branches at once and the next symbol is accepted when both
// branches have taken it. Latency: one cycle after the last bit of a symbol.
module symbol_mapper
  import sdr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 640  // 2560 chips per slot / smallest SF of 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mod_cfg_t          cfg,
  input  logic              restart,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic signed [1:0] in_level,
  output logic              i_valid,
  input  logic              i_ready,
  output sample_t           i_data,
  output logic              q_valid,
  input  logic              q_ready,
  output sample_t           q_data
);

  localparam int unsigned AW = $clog2(BUF_DEPTH);

  logic           dual;
  logic [1:0]     bits_per_sym;
  logic [BLW-1:0] cnt;          // level index within the burst
  logic [1:0]     nbits;        // bits gathered for the current symbol
  logic [1:0]     shreg;        // earlier bits of the current symbol, first bit in [1]
  logic [1:0]     ksym;         // symbol index mod 4 (GMSK j^k)
  logic [3:0]     dphase;       // pi/4-DQPSK accumulated phase, units of pi/8
  logic           draining;
  logic [BLW-1:0] ird, qrd;

  logic signed [1:0] ibuf [BUF_DEPTH];
  logic signed [1:0] qbuf [BUF_DEPTH];

  logic       fire, bitv, sym_done, burst_start;
  logic [2:0] sbits;            // complete symbol bits, first bit in [2] (8PSK) etc.
  logic [3:0] m_new, dphase_new;
  cplx_t      z;

  assign dual = (cfg.mod_num == MOD_DUAL) && (cfg.i_len != '0);

  always_comb begin
    unique case (cfg.mod_num)
      MOD_PI4DQPSK, MOD_QPSK: bits_per_sym = 2'd2;
      MOD_DUAL:               bits_per_sym = 2'd3;
      default:                bits_per_sym = 2'd1;
    endcase
  end

  assign in_ready    = !restart && (dual ? !draining : (!i_valid && !q_valid));
  assign fire        = in_valid && in_ready;
  assign bitv        = (cfg.nrz == NRZ_OFF) ? in_level[0] : in_level[1];
  assign burst_start = (cnt == '0);
  assign sym_done    = ({1'b0, nbits} + 3'd1) == {1'b0, bits_per_sym};

  // Symbol formation for the non-dual modes.
  always_comb begin
    sbits      = {shreg, bitv};
    dphase_new = burst_start ? 4'd0 : dphase;
    m_new      = '0;
    z          = '0;
    unique case (cfg.mod_num)
      MOD_GMSK: begin
        m_new = {(burst_start ? 2'd0 : ksym), 2'b00};   // j^k
        z     = phase_point(m_new);
        if (in_level == -2'sd1) begin
          z.i = -z.i;
          z.q = -z.q;
        end else if (in_level == 2'sd0) begin
          z = '0;
        end
      end
      MOD_PI4DQPSK: begin
        unique case (sbits[1:0])
          2'b00:   dphase_new = dphase_new + 4'd2;
          2'b01:   dphase_new = dphase_new + 4'd6;
          2'b11:   dphase_new = dphase_new + 4'd10;
          default: dphase_new = dphase_new + 4'd14;
        endcase
        z = phase_point(dphase_new);
      end
      MOD_QPSK: begin
        unique case (sbits[1:0])
          2'b00:   m_new = 4'd2;
          2'b10:   m_new = 4'd6;
          2'b11:   m_new = 4'd10;
          default: m_new = 4'd14;
        endcase
        z = phase_point(m_new);
      end
      default: begin // 8PSK
        unique case (sbits)
          3'b111:  m_new = 4'd0;
          3'b011:  m_new = 4'd2;
          3'b010:  m_new = 4'd4;
          3'b000:  m_new = 4'd6;
          3'b001:  m_new = 4'd8;
          3'b101:  m_new = 4'd10;
          3'b100:  m_new = 4'd12;
          default: m_new = 4'd14;
        endcase
        z = phase_point(m_new);
      end
    endcase
  end

  // Branch buffers of the dual-QPSK mode.
  always_ff @(posedge clk) begin
    if (fire && dual) begin
      if (cnt < cfg.i_len)
        ibuf[AW'(cnt)] <= in_level;
      else if (cnt - cfg.i_len < cfg.q_len)
        qbuf[AW'(cnt - cfg.i_len)] <= in_level;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      nbits    <= '0;
      shreg    <= '0;
      ksym     <= '0;
      dphase   <= '0;
      draining <= 1'b0;
      ird      <= '0;
      qrd      <= '0;
      i_valid  <= 1'b0;
      q_valid  <= 1'b0;
      i_data   <= '0;
      q_data   <= '0;
    end else if (restart) begin
      cnt      <= '0;
      nbits    <= '0;
      ksym     <= '0;
      dphase   <= '0;
      draining <= 1'b0;
      i_valid  <= 1'b0;
      q_valid  <= 1'b0;
    end else if (dual) begin
      // Fill, then read the two branch buffers out independently.
      if (fire) begin
        if (cnt >= cfg.burst_len - 1'b1) begin
          cnt      <= '0;
          draining <= 1'b1;
          ird      <= '0;
          qrd      <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (draining) begin
        if (!i_valid || i_ready) begin
          if (ird < cfg.i_len) begin
            i_valid <= 1'b1;
            i_data  <= sample_t'(AMP * ibuf[AW'(ird)]);
            ird     <= ird + 1'b1;
          end else begin
            i_valid <= 1'b0;
          end
        end
        if (!q_valid || q_ready) begin
          if (qrd < cfg.q_len) begin
            q_valid <= 1'b1;
            q_data  <= sample_t'(AMP * qbuf[AW'(qrd)]);
            qrd     <= qrd + 1'b1;
          end else begin
            q_valid <= 1'b0;
          end
        end
        if (ird >= cfg.i_len && qrd >= cfg.q_len &&
            (!i_valid || i_ready) && (!q_valid || q_ready))
          draining <= 1'b0;
      end
    end else begin
      if (i_valid && i_ready) i_valid <= 1'b0;
      if (q_valid && q_ready) q_valid <= 1'b0;
      if (fire) begin
        cnt <= (cnt >= cfg.burst_len - 1'b1) ? '0 : cnt + 1'b1;
        if (burst_start) begin
          ksym   <= '0;
          dphase <= '0;
        end
        if (sym_done) begin
          nbits   <= '0;
          i_valid <= 1'b1;
          q_valid <= 1'b1;
          i_data  <= z.i;
          q_data  <= z.q;
          ksym    <= (burst_start ? 2'd0 : ksym) + 2'd1;
          dphase  <= dphase_new;
        end else begin
          nbits <= nbits + 2'd1;
          shreg <= {shreg[0], bitv};
        end
      end
    end
  end

  a_hold_i: assert property (@(posedge clk) disable iff (!rst_n || restart)
    i_valid && !i_ready |=> i_valid && $stable(i_data));
  a_hold_q: assert property (@(posedge clk) disable iff (!rst_n || restart)
    q_valid && !q_ready |=> q_valid && $stable(q_data));

endmodule
