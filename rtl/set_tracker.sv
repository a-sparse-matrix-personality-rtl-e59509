// set_tracker: keeps numActive(set), the number of partial values of each
// accumulation set that are still live inside the reduction circuit.
// Following the description, three small dual-ported memories each hold one
// counter per set ID, each updated by read-modify-write on its write port:
//   mem1 (+) at inc_set  : +1 when a new input value of that set arrives,
//   mem2 (-) at comb_set : +1 when two values of that set enter the adder,
//   mem3 (-) at ret_set  : +1 when the set's final sum leaves the circuit.
// numActive(s) = mem1[s] - mem2[s] - mem3[s]. The description reads it for
// the set at the adder output only; this design has NRD read ports (port 0
// for the adder output, the others used by the accumulator to check the
// incoming set and the buffered sets). Reads are combinational and show the
// counts before this cycle's updates.
// Set IDs index the memories modulo DEPTH; counters wrap modulo 2^CNT_W,
// which keeps the difference exact while fewer than DEPTH sets are live and
// fewer than 2^CNT_W values of one set are live. DEPTH and CNT_W are this
// design's choices (the description calls the memories "small").
module set_tracker #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned CNT_W = 8,
  parameter int unsigned SET_W = 32,
  parameter int unsigned NRD   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc_en,
  input  logic [SET_W-1:0] inc_set,
  input  logic             comb_en,
  input  logic [SET_W-1:0] comb_set,
  input  logic             ret_en,
  input  logic [SET_W-1:0] ret_set,
  input  logic [NRD-1:0][SET_W-1:0] rd_set,
  output logic [NRD-1:0][CNT_W-1:0] num_active
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CNT_W-1:0] mem1 [DEPTH];
  logic [CNT_W-1:0] mem2 [DEPTH];
  logic [CNT_W-1:0] mem3 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem1[i] <= '0;
        mem2[i] <= '0;
        mem3[i] <= '0;
      end
    end else begin
      if (inc_en)  mem1[inc_set[AW-1:0]]  <= mem1[inc_set[AW-1:0]]  + 1'b1;
      if (comb_en) mem2[comb_set[AW-1:0]] <= mem2[comb_set[AW-1:0]] + 1'b1;
      if (ret_en)  mem3[ret_set[AW-1:0]]  <= mem3[ret_set[AW-1:0]]  + 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      num_active[r] = mem1[rd_set[r][AW-1:0]] - mem2[rd_set[r][AW-1:0]] - mem3[rd_set[r][AW-1:0]];
  end
endmodule
