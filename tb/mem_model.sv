// mem_model: behavioural model of the next memory level, for testbenches only.
//
// Accepts one request at a time (req_ready high while idle). A read returns the
// whole line at the line-aligned address, and a write stores one word; either is
// answered by a one-cycle resp_valid LATENCY cycles after the request was accepted
// (60 core cycles by default, the bulk memory access time of the evaluated core).
// Unwritten words hold cc_ref_pkg::mem_word(address). n_reads / n_writes count the
// requests served.
module mem_model #(
  parameter int unsigned LATENCY    = 60,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [31:0]             req_wdata,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_data
);

  int unsigned wr_mem [int unsigned];
  int unsigned n_reads, n_writes;
  int unsigned cnt;
  logic        busy, we_q;
  logic [31:0] addr_q;

  function automatic int unsigned read_word(int unsigned a);
    if (wr_mem.exists(a)) return wr_mem[a];
    return cc_ref_pkg::mem_word(a);
  endfunction

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; cnt <= 0; resp_valid <= 0; resp_data <= '0;
      n_reads <= 0; n_writes <= 0; we_q <= 0; addr_q <= '0;
    end else begin
      resp_valid <= 0;
      if (!busy && req_valid) begin
        busy   <= 1;
        cnt    <= 1;
        we_q   <= req_we;
        addr_q <= req_addr;
        if (req_we) begin
          wr_mem[req_addr & ~32'h3] = req_wdata;
          n_writes <= n_writes + 1;
        end else begin
          n_reads <= n_reads + 1;
        end
      end else if (busy) begin
        cnt <= cnt + 1;
        if (cnt == LATENCY - 1) begin
          resp_valid <= 1;
          for (int i = 0; i < LINE_BYTES / 4; i++)
            resp_data[i*32 +: 32] <= read_word((addr_q & ~(LINE_BYTES - 1)) + 4 * i);
        end
        if (cnt == LATENCY) busy <= 0;
      end
    end
  end

endmodule
