// log2int_pipe -- polynomial evaluation for log-to-fixed-point conversion on
// the pipelined LNS ALU.
//
// Evaluates, for a block of BLOCK (3) LNS inputs x[n], the degree-5
// polynomial
//     y = k0 + (k1 + (k2 + (k3 + (k4 + k5 x) x) x) x) x
// in Horner form, every step being one fast LNS multiply (lns_fast_ops,
// combinational, in front of the ALU input) followed by one add issued to
// the pipelined ALU: step 0 issues k4 + k5*x[n], step s > 0 issues
// k[4-s] + x[n]*z[n], where z[n] is the previous result of element n. The
// three elements are interleaved so that the three pipe blocks are busy
// with independent work: issue t belongs to element t mod 3 and may go as
// soon as the result of issue t - 3 has been read. With a 5-cycle issue
// interval and 13-cycle latency a block of 3 takes 5*14 + 13 + 1 = 84
// cycles, against 3 * 5 * (9..12) for a non-pipelined ALU.
//
// Interface: pulse start (while busy is low) with x and k stable; the
// block drives the ALU input channel and reads every add result while
// busy. done pulses for one cycle when y and y_st are valid; they hold
// until the next start. y is the LNS value of the polynomial; the
// coefficients are inputs, since no coefficient set is given. The final
// re-packing of y into a 24-bit integer word and the extension of the input
// range to (-1, 1) are not part of this block.
module log2int_pipe
  import lns_pkg::*;
#(
  parameter int unsigned BLOCK = 3,
  parameter int unsigned ORDER = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  lns_t        x    [BLOCK],
  input  lns_t        k    [ORDER+1],
  output lns_t        y    [BLOCK],
  output lns_status_t y_st [BLOCK],
  // master side of the pipelined ALU channel
  output logic        alu_in_valid,
  input  logic        alu_in_ready,
  output alu_op_t     alu_in_op,
  output lns_t        alu_in_a,
  output lns_t        alu_in_b,
  input  logic        alu_add_valid,
  output logic        alu_add_ready,
  input  lns_t        alu_add_z,
  input  lns_status_t alu_add_st
);

  localparam int unsigned N  = BLOCK * ORDER;   // adds per block
  localparam int unsigned TW = $clog2(N + 1);
  localparam int unsigned EW = $clog2(BLOCK);
  localparam int unsigned SW = $clog2(ORDER);

  logic [TW-1:0] issued, received;
  logic [EW-1:0] ie, re;      // element of the next issue / next result
  logic [SW-1:0] step;          // Horner step of the next issue
  lns_t          z [BLOCK];
  lns_t          mul_a, prod;
  logic          can_issue;

  // issue t may go once the result of issue t - BLOCK has been read
  assign can_issue = busy && (issued < TW'(N)) &&
                     ((issued < TW'(BLOCK)) || (received + TW'(BLOCK) > issued));

  assign mul_a = (step == '0) ? k[ORDER] : z[ie];

  lns_fast_ops u_lm (.op(OP_MUL), .a(mul_a), .b(x[ie]), .z(prod));

  assign alu_in_valid  = can_issue;
  assign alu_in_op     = OP_ADD;
  assign alu_in_a      = k[ORDER - 1 - int'(step)];
  assign alu_in_b      = prod;
  assign alu_add_ready = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      issued   <= '0;
      received <= '0;
      ie       <= '0;
      re       <= '0;
      step     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        issued   <= '0;
        received <= '0;
        ie       <= '0;
        re       <= '0;
        step     <= '0;
      end else if (busy) begin
        if (can_issue && alu_in_ready) begin
          issued <= issued + 1'b1;
          if (ie == EW'(BLOCK - 1)) begin
            ie <= '0;
            step <= step + 1'b1;
          end else begin
            ie <= ie + 1'b1;
          end
        end
        if (alu_add_valid) begin
          received <= received + 1'b1;
          re       <= (re == EW'(BLOCK - 1)) ? '0 : re + 1'b1;
          if (received == TW'(N - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      for (int n = 0; n < BLOCK; n++) y_st[n] <= ST_OK;
    end else if (busy && alu_add_valid) begin
      z[re]    <= alu_add_z;
      y[re]    <= alu_add_z;
      y_st[re] <= y_st[re] | alu_add_st;
    end
  end

endmodule
