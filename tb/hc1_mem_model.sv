// hc1_mem_model: behavioural model of the coprocessor memory system seen by
// the application engines (memory controllers, crossbar and DIMMs), for
// testbenches only. NP independent 64-bit ports share one word-addressed
// store (an associative array, unwritten words read as 0). A read request
// returns its data and tag after a random latency of MIN_LAT..MAX_LAT
// cycles; each port returns at most one response per cycle and picks a
// random ready request, so responses come back out of order. A write is
// stored when accepted. Each port asserts stall on a random STALL_PCT
// percent of cycles; a request presented while its port stalls is not
// taken. Counts of accepted reads, writes and stall cycles are kept.
module hc1_mem_model #(
  parameter int NP        = 16,
  parameter int MIN_LAT   = 8,
  parameter int MAX_LAT   = 40,
  parameter int STALL_PCT = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NP-1:0]          req_valid,
  input  logic [NP-1:0]          req_we,
  input  logic [NP-1:0][47:0]    req_addr,
  input  logic [NP-1:0][63:0]    req_wdata,
  input  logic [NP-1:0][10:0]    req_tag,
  output logic [NP-1:0]          stall,
  output logic [NP-1:0]          resp_valid,
  output logic [NP-1:0][63:0]    resp_data,
  output logic [NP-1:0][10:0]    resp_tag
);
  logic [63:0] mem [longint];

  typedef struct {
    longint      due;
    logic [63:0] data;
    logic [10:0] tag;
  } pend_t;
  pend_t pend [NP][$];
  longint cyc = 0;
  int n_reads = 0, n_writes = 0, n_stall = 0;

  function automatic logic [63:0] rd(input longint byte_addr);
    return mem.exists(byte_addr >> 3) ? mem[byte_addr >> 3] : 64'h0;
  endfunction
  function automatic void wr(input longint byte_addr, input logic [63:0] d);
    mem[byte_addr >> 3] = d;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < NP; p++) begin
      resp_valid[p] <= 1'b0;
      if (rst_n) begin
        if (stall[p]) n_stall++;
        if (req_valid[p] && !stall[p]) begin
          if (req_we[p]) begin
            wr(longint'(req_addr[p]), req_wdata[p]);
            n_writes++;
          end else begin
            pend_t e;
            e.due  = cyc + longint'(MIN_LAT + int'($urandom % (MAX_LAT - MIN_LAT + 1)));
            e.data = rd(longint'(req_addr[p]));
            e.tag  = req_tag[p];
            pend[p].push_back(e);
            n_reads++;
          end
        end
        begin
          automatic int ready [$];
          for (int i = 0; i < pend[p].size(); i++) if (pend[p][i].due <= cyc) ready.push_back(i);
          if (ready.size() > 0) begin
            automatic int k = ready[$urandom % ready.size()];
            resp_valid[p] <= 1'b1;
            resp_data[p]  <= pend[p][k].data;
            resp_tag[p]   <= pend[p][k].tag;
            pend[p].delete(k);
          end
        end
        stall[p] <= ($urandom % 100) < STALL_PCT;
      end else begin
        stall[p] <= 1'b0;
      end
    end
  end
endmodule
