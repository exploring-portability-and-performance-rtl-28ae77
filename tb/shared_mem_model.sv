// Behavioural model (not synthesizable) of the shared memory seen by the
// accelerator: a word array with one line read port and one masked line
// write port, each PAR words wide.
//
// Reads: a request is accepted when rd_req_ready is high; the line is
// sampled at acceptance and returned, in request order, with its tag after a
// latency between 1 and max_lat cycles, at most one response per cycle.
// Writes: applied at acceptance, word k only if wr_mask[k]. Words outside
// the array read as 0 and are never written. stall_pct sets how often (in
// percent) each ready is withheld in a cycle. Statistics count accepted
// requests and withheld readies.
module shared_mem_model
  import nw_pkg::*;
#(
  parameter int unsigned PAR   = 4,
  parameter int unsigned WORDS = 4096
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_req_valid,
  output logic            rd_req_ready,
  input  addr_t           rd_req_addr,
  input  logic [1:0]      rd_req_tag,
  output logic            rd_rsp_valid,
  output word_t [PAR-1:0] rd_rsp_data,
  output logic [1:0]      rd_rsp_tag,
  input  logic            wr_valid,
  output logic            wr_ready,
  input  addr_t           wr_addr,
  input  word_t [PAR-1:0] wr_data,
  input  logic  [PAR-1:0] wr_mask
);

  typedef struct packed {
    longint          due;
    logic [1:0]      tag;
    word_t [PAR-1:0] data;
  } rsp_t;

  word_t  mem [WORDS];
  rsp_t   q [$];
  longint cycle;
  int     stall_pct = 0;
  int     max_lat   = 1;
  int     rd_count = 0, wr_count = 0, rd_stalls = 0, wr_stalls = 0;

  function automatic word_t peek(longint a);
    return (a >= 0 && a < longint'(WORDS)) ? mem[a] : '0;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle        <= 0;
      rd_req_ready <= 1'b0;
      wr_ready     <= 1'b0;
      rd_rsp_valid <= 1'b0;
      rd_rsp_data  <= '0;
      rd_rsp_tag   <= '0;
    end else begin
      cycle <= cycle + 1;
      // write
      if (wr_valid && wr_ready) begin
        wr_count <= wr_count + 1;
        for (int k = 0; k < int'(PAR); k++)
          if (wr_mask[k] && longint'(wr_addr) + k < longint'(WORDS))
            mem[longint'(wr_addr) + k] = wr_data[k];
      end
      if (wr_valid && !wr_ready) wr_stalls <= wr_stalls + 1;
      // read request
      if (rd_req_valid && rd_req_ready) begin
        rsp_t e;
        e.due = cycle + 1 + longint'($urandom_range(max_lat - 1, 0));
        if (q.size() > 0 && e.due < q[$].due) e.due = q[$].due;
        e.tag = rd_req_tag;
        for (int k = 0; k < int'(PAR); k++) e.data[k] = peek(longint'(rd_req_addr) + k);
        q.push_back(e);
        rd_count <= rd_count + 1;
      end
      if (rd_req_valid && !rd_req_ready) rd_stalls <= rd_stalls + 1;
      // response
      if (q.size() > 0 && q[0].due <= cycle) begin
        rsp_t h;
        h = q.pop_front();
        rd_rsp_valid <= 1'b1;
        rd_rsp_data  <= h.data;
        rd_rsp_tag   <= h.tag;
      end else begin
        rd_rsp_valid <= 1'b0;
      end
      rd_req_ready <= ($urandom_range(99, 0) >= stall_pct);
      wr_ready     <= ($urandom_range(99, 0) >= stall_pct);
    end
  end

endmodule
