// viterbi_decoder: 256-state Viterbi decoder for the K = 9 convolutional codes of
// the UTRA-FDD receiver, rate 1/2 or rate 1/3 chosen per block.
//
// The encoder it inverts shifts each information bit u into a 9-bit register
// r = {u_k, u_(k-1), ..., u_(k-8)} and sends the parities ^(r & G) of its generator
// polynomials (octal, MSB = newest bit): rate 1/2 G0 = 561, G1 = 753; rate 1/3
// G0 = 557, G1 = 663, G2 = 711 (the UTRA-FDD polynomials; generator choice and the
// eight zero tail bits that return the encoder to state 0 are this design's own).
// A block of n_bits information bits therefore arrives as n_bits + 8 code symbols.
// Decoding is hard-decision: the branch metric is the Hamming distance between the
// received symbol and the branch output. Each accepted symbol runs all 256
// add-compare-select operations in one cycle and stores one 256-bit survivor row;
// the path metrics are 8-bit numbers compared modulo 256 (the spread of the metrics
// stays far below 128). After the last symbol the survivors are traced back from
// state 0, one step per cycle, and the decoded bits are then sent out in order.
// Interface: `start` (one cycle, while idle) takes rate13 and n_bits; code symbols
// arrive on in_valid/in_ready with bit i of in_sym the output of generator Gi; the
// decoded bits leave on out_valid/out_ready with out_last on the final one.
// Timing per block: n_bits + 8 cycles to receive (one symbol per cycle),
// n_bits + 8 cycles of traceback, then n_bits cycles of output.
module viterbi_decoder #(
  parameter int unsigned MAX_BITS = 512,       // largest block (information bits)
  parameter logic [8:0]  G12_0 = 9'o561,
  parameter logic [8:0]  G12_1 = 9'o753,
  parameter logic [8:0]  G13_0 = 9'o557,
  parameter logic [8:0]  G13_1 = 9'o663,
  parameter logic [8:0]  G13_2 = 9'o711
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        rate13,
  input  logic [$clog2(MAX_BITS+1)-1:0] n_bits,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [2:0]  in_sym,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_bit,
  output logic        out_last,
  output logic        busy
);

  localparam int unsigned NS    = 256;
  localparam int unsigned TAIL  = 8;
  localparam int unsigned STEPS = MAX_BITS + TAIL;
  localparam int unsigned SW    = $clog2(STEPS + 1);
  localparam int unsigned BW    = $clog2(MAX_BITS + 1);
  localparam int unsigned DAW   = $clog2(MAX_BITS);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_TRACE, S_OUT} st_t;
  st_t st;

  logic           r13;
  logic [BW-1:0]  nb;
  logic [SW-1:0]  step;      // symbols received / traceback position
  logic [BW-1:0]  optr;
  logic [7:0]     tb_state;
  logic [7:0]     pm     [NS];
  logic [7:0]     pm_new [NS];
  logic [NS-1:0]  dec_row;
  logic [NS-1:0]  surv [STEPS];
  logic           dbuf [MAX_BITS];
  logic [NS-1:0]  tb_row;

  // Branch output bits of register {s, b}.
  function automatic logic [2:0] branch_out(logic [8:0] r, logic is13);
    if (is13) return {^(r & G13_2), ^(r & G13_1), ^(r & G13_0)};
    return {1'b0, ^(r & G12_1), ^(r & G12_0)};
  endfunction

  function automatic logic [1:0] hdist(logic [2:0] a, logic [2:0] b);
    logic [2:0] d;
    d = a ^ b;
    return 2'(d[0]) + 2'(d[1]) + 2'(d[2]);
  endfunction

  // Add-compare-select for all states.
  always_comb begin
    logic [2:0] rx;
    rx = r13 ? in_sym : {1'b0, in_sym[1:0]};
    for (int s = 0; s < NS; s++) begin
      logic [7:0] p0, p1, m0, m1;
      p0 = {s[6:0], 1'b0};
      p1 = {s[6:0], 1'b1};
      m0 = pm[p0] + 8'(hdist(branch_out({s[7:0], 1'b0}, r13), rx));
      m1 = pm[p1] + 8'(hdist(branch_out({s[7:0], 1'b1}, r13), rx));
      if ($signed(m1 - m0) < 0) begin   // m1 < m0 (modulo compare)
        pm_new[s]  = m1;
        dec_row[s] = 1'b1;
      end else begin
        pm_new[s]  = m0;
        dec_row[s] = 1'b0;
      end
    end
  end

  assign in_ready = (st == S_RECV);
  assign busy     = (st != S_IDLE);
  assign tb_row   = surv[SW'(step - 1'b1)];

  always_ff @(posedge clk) begin
    if (st == S_RECV && in_valid) surv[step] <= dec_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      r13       <= 1'b0;
      nb        <= '0;
      step      <= '0;
      optr      <= '0;
      tb_state  <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
      for (int s = 0; s < NS; s++) pm[s] <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (start) begin
            st   <= S_RECV;
            r13  <= rate13;
            nb   <= n_bits;
            step <= '0;
            // start in state 0; other states begin well behind
            for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? 8'd0 : 8'd64;
          end
        end
        S_RECV: begin
          if (in_valid) begin
            for (int s = 0; s < NS; s++) pm[s] <= pm_new[s];
            step <= step + 1'b1;
            if (step == SW'(nb) + SW'(TAIL - 1)) begin
              st       <= S_TRACE;
              tb_state <= '0;
            end
          end
        end
        S_TRACE: begin
          // step-1 is the trellis step whose survivors are read; the state's
          // top bit is the information bit of that step.
          if (SW'(step - 1'b1) < SW'(nb)) dbuf[DAW'(step - 1'b1)] <= tb_state[7];
          tb_state <= {tb_state[6:0], tb_row[tb_state]};
          step     <= step - 1'b1;
          if (step == SW'(1)) begin
            st   <= S_OUT;
            optr <= '0;
          end
        end
        default: begin // S_OUT
          if (!out_valid || out_ready) begin
            if (optr < nb) begin
              out_valid <= 1'b1;
              out_bit   <= dbuf[DAW'(optr)];
              out_last  <= (optr == nb - 1'b1);
              optr      <= optr + 1'b1;
            end else begin
              out_valid <= 1'b0;
              out_last  <= 1'b0;
              st        <= S_IDLE;
            end
          end
        end
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_bit));

endmodule
