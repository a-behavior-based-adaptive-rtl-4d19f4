// tb_mem_model: behavioural model of the next memory level (an L2 cache or
// main memory) for the testbenches. Not synthesizable design content.
//
// Accepts one request at a time (`req_ready` is low while one is pending)
// and answers exactly LATENCY cycles after the cycle of acceptance with
// `resp_valid`. A read returns the whole line holding `req_addr`; a store
// writes one word with byte enables and its response is only an
// acknowledgement. A word never stored reads as init_word(address), so the
// testbenches can compute expected data without sharing state with it.
module tb_mem_model #(
  parameter int unsigned LATENCY = 4,
  parameter int unsigned LINE_W  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [31:0]       req_addr,
  input  logic [31:0]       req_wdata,
  input  logic [3:0]        req_be,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_rdata,
  output int unsigned       n_reads,
  output int unsigned       n_writes
);

  localparam int unsigned WPL = LINE_W / 32;

  logic [31:0] store [int unsigned];

  function automatic logic [31:0] init_word(input logic [31:0] a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return (w * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] read_word(input logic [31:0] a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return store.exists(w) ? store[w] : init_word(w);
  endfunction

  int unsigned  cnt;
  logic         busy, we_q;
  logic [31:0]  addr_q;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      resp_valid <= 1'b0;
      cnt        <= 0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy   <= 1'b1;
        cnt    <= 1;
        we_q   <= req_we;
        addr_q <= req_addr;
        if (req_we) begin
          logic [31:0] w;
          w = read_word(req_addr);
          for (int b = 0; b < 4; b++) if (req_be[b]) w[b*8 +: 8] = req_wdata[b*8 +: 8];
          store[{req_addr[31:2], 2'b00}] = w;
          n_writes <= n_writes + 1;
        end else begin
          n_reads <= n_reads + 1;
        end
        if (LATENCY == 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          for (int i = 0; i < WPL; i++)
            resp_rdata[i*32 +: 32] <= read_word({req_addr[31:5], 5'b0} + 32'(i*4));
        end
      end else if (busy) begin
        cnt <= cnt + 1;
        if (cnt == LATENCY - 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          for (int i = 0; i < WPL; i++)
            resp_rdata[i*32 +: 32] <= read_word({addr_q[31:5], 5'b0} + 32'(i*4));
        end
      end
    end
  end

endmodule
