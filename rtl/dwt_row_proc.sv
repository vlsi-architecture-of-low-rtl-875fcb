// dwt_row_proc: horizontal (row) lifting processor, Image_1 / Image_2.
//
// Runs the 1-D 5/3 lifting along the rows handed to it in IRSA order. For
// each three-pixel step of row r in column pass k it produces
//   H(r,k) = X(r,2k+1) - floor((X(r,2k) + X(r,2k+2)) / 2)
//   L(r,k) = X(r,2k)   + floor((H(r,k-1) + H(r,k) + 2) / 4)
// H(r,k-1) belongs to the same row but was produced one column pass (N/2
// steps) earlier, so it is kept in a queue of N/2 words: each step pops
// the old value of its row and pushes the new one. Boundaries use the
// symmetric extension of JPEG2000: X(r,N) = X(r,N-2) (done in the input
// unit) and H(r,-1) = H(r,0) on pass 0.
//
// A single shift-and-add unit is shared: the predict step runs in the
// phase-C cycle of a step (using the pixel on the bus), the update step in
// the following cycle, which is phase A of the next step. Timing: `h_valid`
// is high with H in the cycle after phase C, `l_valid` with L one cycle later.
// Inputs come from the control unit (pix_valid, phase, first/last pass).
// The formulas, the processor's parts (input unit, MAC, queue, multiplexers)
// and the two-row parallelism follow the document; the exact schedule and
// the queue holding H between passes are this design's reading of it.
module dwt_row_proc
  import dwt_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   pix_valid,
  input  phase_t phase,
  input  logic   first_pass,
  input  logic   last_pass,
  input  pixel_t pix,
  output logic   h_valid,
  output coef_t  h,
  output logic   l_valid,
  output coef_t  l
);

  localparam int unsigned QDEPTH = N / 2;

  logic    triple_valid;
  coef_t   a, b, c;
  logic    upd_pend;
  logic    fp_q, lp_q;
  coef_t   h_q, a_hold, l_q;
  logic    l_valid_q;
  mac_op_t op;
  coef_t   m_in1, m_in2, m_in3, m_out;
  coef_t   q_head;
  coef_t   h_left;

  dwt_input_unit u_in (
    .clk, .rst_n, .pix_valid, .phase, .last_pass, .pix,
    .triple_valid, .a, .b, .c
  );

  // H(r,k-1); on pass 0 the left neighbour is the mirrored H(r,0).
  assign h_left = fp_q ? h_q : q_head;

  always_comb begin
    if (upd_pend) begin
      op    = OP_UPDATE;
      m_in1 = h_left;
      m_in2 = a_hold;
      m_in3 = h_q;
    end else begin
      op    = OP_PREDICT;
      m_in1 = a;
      m_in2 = b;
      m_in3 = c;
    end
  end

  dwt_mac u_mac (.op, .in1(m_in1), .in2(m_in2), .in3(m_in3), .out(m_out));

  dwt_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n, .clear,
    .push  (upd_pend && !lp_q),
    .din   (h_q),
    .pop   (upd_pend && !fp_q),
    .dout  (q_head),
    .count (),
    .full  (),
    .empty ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_pend  <= 1'b0;
      fp_q      <= 1'b0;
      lp_q      <= 1'b0;
      h_q       <= '0;
      a_hold    <= '0;
      l_q       <= '0;
      l_valid_q <= 1'b0;
    end else if (clear) begin
      upd_pend  <= 1'b0;
      l_valid_q <= 1'b0;
    end else begin
      l_valid_q <= upd_pend;
      if (upd_pend) l_q <= m_out;
      if (triple_valid) begin
        h_q      <= m_out;
        a_hold   <= a;
        fp_q     <= first_pass;
        lp_q     <= last_pass;
        upd_pend <= 1'b1;
      end else begin
        upd_pend <= 1'b0;
      end
    end
  end

  assign h_valid = upd_pend;
  assign h       = h_q;
  assign l_valid = l_valid_q;
  assign l       = l_q;

  // The shared unit can do only one step per cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             !(triple_valid && upd_pend));

endmodule
