// lns_alu_top -- both LNS ALU cores side by side, with the log-to-int
// polynomial macro attached to the pipelined core.
//
// The non-pipelined core (lns_alu_seq) and the 3-stage pipelined core
// (lns_alu_pipe) are independent: each has its own operation channel, its
// own add/sub and mul/div/sqrt results and its own port to four external
// 32-bit table SRAM banks (F, D, E, P), which live outside this design and
// are loaded by the host before use.
//
// The polynomial macro (log2int_pipe) shares the pipelined core's input
// channel. A start request (l2i_start) is taken only when the pipe is empty
// and no external operation is offered that cycle; while l2i_busy is high the
// macro owns the channel, the external pipe_in_ready is low and every
// add/sub result goes to the macro. Outside that window the external
// channel has the core to itself. This sharing rule is this design's own.
module lns_alu_top
  import lns_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // ---- non-pipelined core ----
  input  logic               seq_in_valid,
  output logic               seq_in_ready,
  input  alu_op_t            seq_in_op,
  input  lns_t               seq_in_a,
  input  lns_t               seq_in_b,
  output logic               seq_add_valid,
  output lns_t               seq_add_z,
  output lns_status_t        seq_add_st,
  output logic               seq_mul_valid,
  output lns_t               seq_mul_z,
  output lns_status_t        seq_mul_st,
  output logic [3:0]         seq_sram_en,
  output logic [SRAM_AW-1:0] seq_sram_addr [4],
  input  logic [31:0]        seq_sram_rdata [4],
  // ---- pipelined core ----
  input  logic               pipe_in_valid,
  output logic               pipe_in_ready,
  input  alu_op_t            pipe_in_op,
  input  lns_t               pipe_in_a,
  input  lns_t               pipe_in_b,
  output logic               pipe_add_valid,
  input  logic               pipe_add_ready,
  output lns_t               pipe_add_z,
  output lns_status_t        pipe_add_st,
  output logic               pipe_mul_valid,
  output lns_t               pipe_mul_z,
  output lns_status_t        pipe_mul_st,
  output logic [3:0]         pipe_sram_en,
  output logic [SRAM_AW-1:0] pipe_sram_addr [4],
  input  logic [31:0]        pipe_sram_rdata [4],
  // ---- log-to-int polynomial macro on the pipelined core ----
  input  logic               l2i_start,
  output logic               l2i_busy,
  output logic               l2i_done,
  input  lns_t               l2i_x  [3],
  input  lns_t               l2i_k  [6],
  output lns_t               l2i_y  [3],
  output lns_status_t        l2i_st [3]
);

  lns_alu_seq u_seq (
    .clk, .rst_n,
    .in_valid(seq_in_valid), .in_ready(seq_in_ready), .in_op(seq_in_op),
    .in_a(seq_in_a), .in_b(seq_in_b),
    .add_valid(seq_add_valid), .add_z(seq_add_z), .add_st(seq_add_st),
    .mul_valid(seq_mul_valid), .mul_z(seq_mul_z), .mul_st(seq_mul_st),
    .sram_en(seq_sram_en), .sram_addr(seq_sram_addr), .sram_rdata(seq_sram_rdata)
  );

  // pipelined core channel, shared with the polynomial macro
  logic        c_in_valid, c_in_ready, c_add_valid, c_add_ready, pipe_empty;
  alu_op_t     c_in_op;
  lns_t        c_in_a, c_in_b, c_add_z;
  lns_status_t c_add_st;
  logic        m_in_valid, m_add_ready, m_start;
  alu_op_t     m_in_op;
  lns_t        m_in_a, m_in_b;

  lns_alu_pipe u_pipe (
    .clk, .rst_n,
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_op(c_in_op),
    .in_a(c_in_a), .in_b(c_in_b),
    .add_valid(c_add_valid), .add_ready(c_add_ready), .add_z(c_add_z), .add_st(c_add_st),
    .mul_valid(pipe_mul_valid), .mul_z(pipe_mul_z), .mul_st(pipe_mul_st),
    .empty(pipe_empty),
    .sram_en(pipe_sram_en), .sram_addr(pipe_sram_addr), .sram_rdata(pipe_sram_rdata)
  );

  assign m_start = l2i_start && pipe_empty && !pipe_in_valid;

  log2int_pipe u_l2i (
    .clk, .rst_n,
    .start(m_start), .busy(l2i_busy), .done(l2i_done),
    .x(l2i_x), .k(l2i_k), .y(l2i_y), .y_st(l2i_st),
    .alu_in_valid(m_in_valid), .alu_in_ready(c_in_ready), .alu_in_op(m_in_op),
    .alu_in_a(m_in_a), .alu_in_b(m_in_b),
    .alu_add_valid(c_add_valid && l2i_busy), .alu_add_ready(m_add_ready),
    .alu_add_z(c_add_z), .alu_add_st(c_add_st)
  );

  always_comb begin
    if (l2i_busy) begin
      c_in_valid  = m_in_valid;
      c_in_op     = m_in_op;
      c_in_a      = m_in_a;
      c_in_b      = m_in_b;
      c_add_ready = m_add_ready;
    end else begin
      c_in_valid  = pipe_in_valid;
      c_in_op     = pipe_in_op;
      c_in_a      = pipe_in_a;
      c_in_b      = pipe_in_b;
      c_add_ready = pipe_add_ready;
    end
  end

  assign pipe_in_ready  = c_in_ready && !l2i_busy;
  assign pipe_add_valid = c_add_valid && !l2i_busy;
  assign pipe_add_z     = c_add_z;
  assign pipe_add_st    = c_add_st;

endmodule
