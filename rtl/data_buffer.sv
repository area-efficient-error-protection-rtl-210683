// data_buffer: line buffer between the L2 arrays and the 8-byte memory bus.
//
// It takes one job at a time from the cache controller while ready_o is high:
// a write-back (wb_valid_i, with the line address and the 64-byte line) or a
// line fill (fill_valid_i, with the line address). For either it first sends a
// request on the bus (mem_req_valid/ready handshake, mem_req_write telling the
// kind). A write-back then sends the line as 8 beats of 64 bits, word 0 first
// (mem_wvalid/mem_wready); a fill collects 8 beats from mem_rvalid/mem_rdata
// and presents the line on fill_line_o with a one-cycle fill_done_o. The
// buffer is free again (ready_o) after the last write beat or the fill.
// The document shows the buffer and gives the 8-byte memory width; the bus
// protocol is this design's choice.
module data_buffer
  import l2ecc_pkg::*;
#(
  parameter int unsigned LADDR_W = 26
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready_o,
  input  logic               wb_valid_i,
  input  logic [LADDR_W-1:0] wb_laddr_i,
  input  line_t              wb_line_i,
  input  logic               fill_valid_i,
  input  logic [LADDR_W-1:0] fill_laddr_i,
  output line_t              fill_line_o,
  output logic               fill_done_o,
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_write,
  output logic [LADDR_W-1:0] mem_req_laddr,
  output logic               mem_wvalid,
  input  logic               mem_wready,
  output word_t              mem_wdata,
  input  logic               mem_rvalid,
  input  word_t              mem_rdata
);

  typedef enum logic [1:0] {B_IDLE, B_REQ, B_WDATA, B_RDATA} bstate_t;

  bstate_t         state;
  line_t           buf_q;
  logic [WSEL_W-1:0] beat;

  assign ready_o       = (state == B_IDLE);
  assign mem_req_valid = (state == B_REQ);
  assign mem_wvalid    = (state == B_WDATA);
  assign mem_wdata     = buf_q[beat*WORD_W +: WORD_W];
  assign fill_line_o   = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= B_IDLE;
      beat          <= '0;
      mem_req_write <= 1'b0;
      mem_req_laddr <= '0;
      fill_done_o   <= 1'b0;
      buf_q         <= '0;
    end else begin
      fill_done_o <= 1'b0;
      unique case (state)
        B_IDLE: begin
          beat <= '0;
          if (wb_valid_i) begin
            buf_q         <= wb_line_i;
            mem_req_write <= 1'b1;
            mem_req_laddr <= wb_laddr_i;
            state         <= B_REQ;
          end else if (fill_valid_i) begin
            mem_req_write <= 1'b0;
            mem_req_laddr <= fill_laddr_i;
            state         <= B_REQ;
          end
        end
        B_REQ: if (mem_req_ready) state <= mem_req_write ? B_WDATA : B_RDATA;
        B_WDATA: if (mem_wready) begin
          beat <= beat + 1'b1;
          if (beat == WSEL_W'(LINE_WORDS - 1)) state <= B_IDLE;
        end
        B_RDATA: if (mem_rvalid) begin
          buf_q[beat*WORD_W +: WORD_W] <= mem_rdata;
          beat <= beat + 1'b1;
          if (beat == WSEL_W'(LINE_WORDS - 1)) begin
            fill_done_o <= 1'b1;
            state       <= B_IDLE;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // A job may only be offered while the buffer is free.
  a_job_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_valid_i || fill_valid_i) |-> ready_o);

endmodule
