// mem_model: behavioural model of the off-chip main memory on the 8-byte
// bus used by data_buffer (not synthesizable, testbench only).
//
// Requests are ignored while rst_n is low. One request at a time: after mem_req_valid is accepted (mem_req_ready high
// while idle), a write takes 8 beats of 64 bits (word 0 first) and a read
// returns 8 beats after LATENCY cycles, one per cycle. Words never written
// read as init_word(word address) = {~a[31:0], a[31:0] ^ 32'h5a5a_0f0f},
// a formula testbenches repeat for their reference. Counts reads and writes.
module mem_model #(
  parameter int unsigned LADDR_W = 26,
  parameter int unsigned LATENCY = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mem_req_valid,
  output logic               mem_req_ready,
  input  logic               mem_req_write,
  input  logic [LADDR_W-1:0] mem_req_laddr,
  input  logic               mem_wvalid,
  output logic               mem_wready,
  input  logic [63:0]        mem_wdata,
  output logic               mem_rvalid,
  output logic [63:0]        mem_rdata
);

  logic [63:0] mem [longint unsigned];
  int unsigned reads = 0, writes = 0;

  function automatic logic [63:0] init_word(input longint unsigned a);
    return {~a[31:0], a[31:0] ^ 32'h5a5a_0f0f};
  endfunction

  function automatic logic [63:0] peek(input longint unsigned a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  initial begin
    mem_req_ready = 1'b1;
    mem_wready    = 1'b0;
    mem_rvalid    = 1'b0;
    mem_rdata     = '0;
    forever begin
      @(posedge clk);
      if (rst_n && mem_req_valid && mem_req_ready) begin
        automatic longint unsigned base = longint'(mem_req_laddr) * 8;
        mem_req_ready <= 1'b0;
        if (mem_req_write) begin
          writes++;
          mem_wready <= 1'b1;
          for (int i = 0; i < 8; i++) begin
            @(posedge clk);
            while (!mem_wvalid) @(posedge clk);
            mem[base + longint'(i)] = mem_wdata;
          end
          mem_wready <= 1'b0;
        end else begin
          reads++;
          repeat (LATENCY - 1) @(posedge clk);
          for (int i = 0; i < 8; i++) begin
            mem_rvalid <= 1'b1;
            mem_rdata  <= peek(base + longint'(i));
            @(posedge clk);
          end
          mem_rvalid <= 1'b0;
        end
        mem_req_ready <= 1'b1;
      end
    end
  end

endmodule
