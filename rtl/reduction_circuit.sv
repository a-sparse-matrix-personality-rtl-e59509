// reduction_circuit: streaming floating-point accumulator built from one
// pipelined double adder, a few buffers and a controller. Values arrive one
// per cycle tagged with a set ID (the matrix row); sets are contiguous in the
// stream and of unknown length. Each cycle the controller picks the first
// rule that applies, in the description's order of priority:
//   R1 adder output + buffered value of the same set; input goes to that buffer
//   R2 two buffered values of the same set; input takes one buffer, the adder
//      output (unless finished) the other
//   R3 input + adder output of the same set
//   R4 input + buffered value of the same set; adder output takes that buffer
//   R5 input + 0; adder output goes to a free buffer
// With no input, an unfinished adder output is buffered if another value of
// its set is live, otherwise it re-enters the adder with 0 (Fig. 3f).
// A set is finished when numActive(set) = 1 (set_tracker) and the set is
// closed. The description's rules do not say how a set is known to be
// closed; here an input carries `in_last` on the final value of its set
// (the row terminator), and a set stays open until then. Also this design's
// own: (a) when R5 finds no free buffer the input is held back (in_ready
// low) instead of raising an error, (b) a new set is held back until its
// set-tracker slot is free, so set IDs never alias, and (c) a buffered value that is the
// only live value of a closed set is sent straight to the output in a cycle
// with no other result ("drain"), since no rule would ever pick it up.
// Interface: valid/ready on the input, valid/ready on the result; the whole
// circuit (adder pipe included) freezes while out_ready is low. `idle` is
// high when no value is held anywhere. ev_* pulse once per event for
// testbenches and performance counting.
module reduction_circuit #(
  parameter int unsigned ADD_LAT = 14,
  parameter int unsigned NBUF    = 4,
  parameter int unsigned SET_W   = 32,
  parameter int unsigned TRK_DEPTH = 32,
  parameter int unsigned CNT_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      in_value,
  input  logic [SET_W-1:0] in_set,
  input  logic             in_last,
  output logic             in_ready,
  output logic             out_valid,
  output logic [63:0]      out_value,
  output logic [SET_W-1:0] out_set,
  input  logic             out_ready,
  output logic             idle,
  output logic [4:0]       ev_rule,
  output logic             ev_recirc,
  output logic             ev_stall,
  output logic             ev_drain
);
  localparam int unsigned BW = (NBUF > 1) ? $clog2(NBUF) : 1;

  // Buffers
  logic [NBUF-1:0]            buf_v;
  logic [NBUF-1:0][63:0]      buf_val;
  logic [NBUF-1:0][SET_W-1:0] buf_set;
  logic [NBUF-1:0]            nbuf_v;
  logic [NBUF-1:0][63:0]      nbuf_val;
  logic [NBUF-1:0][SET_W-1:0] nbuf_set;

  // Open set: the set of the latest input, until its last value arrived.
  logic             open_v;
  logic [SET_W-1:0] open_set;

  // Adder
  logic             add_v, aout_v, en;
  logic [63:0]      add_a, add_b, aout_val;
  logic [SET_W-1:0] add_set, aout_set;
  logic [$clog2(ADD_LAT+1):0] inflight;

  // Tracker
  logic             comb_en, ret_en, take_in;
  logic [SET_W-1:0] ret_set;
  logic [CNT_W-1:0] na_out, na_in, na_cand;
  logic [NBUF+1:0][SET_W-1:0] trk_set;
  logic [NBUF+1:0][CNT_W-1:0] trk_na;
  logic             in_new, in_ok;

  // Match search results
  logic          m1_f, m2_f, m4_f, free_f, cand_f;
  logic [BW-1:0] m1_i, m2_i, m2_j, m4_i, free_i, cand_i;
  logic          a_done, cand_lone;

  function automatic logic is_closed(input logic [SET_W-1:0] s, input logic ov,
                                     input logic [SET_W-1:0] os);
    return !(ov && (os == s));
  endfunction

  assign en = out_ready;

  always_comb begin
    m1_f = 1'b0; m1_i = '0;
    m2_f = 1'b0; m2_i = '0; m2_j = '0;
    m4_f = 1'b0; m4_i = '0;
    free_f = 1'b0; free_i = '0;
    cand_f = 1'b0; cand_i = '0;
    for (int n = NBUF-1; n >= 0; n--) begin
      if (buf_v[n] && aout_v && buf_set[n] == aout_set) begin m1_f = 1'b1; m1_i = BW'(n); end
      if (buf_v[n] && in_ok && buf_set[n] == in_set) begin m4_f = 1'b1; m4_i = BW'(n); end
      if (!buf_v[n]) begin free_f = 1'b1; free_i = BW'(n); end
      if (buf_v[n] && is_closed(buf_set[n], open_v, open_set) &&
          trk_na[n+2] == CNT_W'(1)) begin
        cand_f = 1'b1; cand_i = BW'(n);
      end
      for (int k = NBUF-1; k > n; k--) begin
        if (buf_v[n] && buf_v[k] && buf_set[n] == buf_set[k]) begin
          m2_f = 1'b1; m2_i = BW'(n); m2_j = BW'(k);
        end
      end
    end
  end

  set_tracker #(.DEPTH(TRK_DEPTH), .CNT_W(CNT_W), .SET_W(SET_W), .NRD(NBUF+2)) u_trk (
    .clk, .rst_n,
    .inc_en  (take_in && en), .inc_set (in_set),
    .comb_en (comb_en && en), .comb_set(add_set),
    .ret_en  (ret_en && en),  .ret_set (ret_set),
    .rd_set(trk_set), .num_active(trk_na)
  );

  always_comb begin
    trk_set[0] = aout_set;
    trk_set[1] = in_set;
    for (int n = 0; n < NBUF; n++) trk_set[n+2] = buf_set[n];
  end
  assign na_out  = trk_na[0];
  assign na_in   = trk_na[1];
  assign na_cand = trk_na[32'(cand_i) + 2];
  // A new set may only enter once its tracker slot (set ID modulo
  // TRK_DEPTH) holds no live value of an older set.
  assign in_new = !(open_v && open_set == in_set);
  assign in_ok  = in_valid && !(in_new && na_in != '0);

  assign a_done    = aout_v && (na_out == CNT_W'(1)) && is_closed(aout_set, open_v, open_set);
  assign cand_lone = cand_f && (na_cand == CNT_W'(1));

  always_comb begin
    nbuf_v   = buf_v;
    nbuf_val = buf_val;
    nbuf_set = buf_set;
    add_v = 1'b0; add_a = '0; add_b = '0; add_set = aout_set;
    comb_en = 1'b0; take_in = 1'b0;
    out_valid = 1'b0; out_value = aout_val; out_set = aout_set;
    ret_en = 1'b0; ret_set = aout_set;
    ev_rule = '0; ev_recirc = 1'b0; ev_stall = 1'b0; ev_drain = 1'b0;

    if (m1_f) begin                                   // Rule 1
      ev_rule[0] = 1'b1;
      add_v = 1'b1; add_a = aout_val; add_b = buf_val[m1_i]; add_set = aout_set;
      comb_en = 1'b1;
      take_in = in_ok;
      nbuf_v[m1_i] = in_ok; nbuf_val[m1_i] = in_value; nbuf_set[m1_i] = in_set;
    end else if (m2_f) begin                          // Rule 2
      ev_rule[1] = 1'b1;
      add_v = 1'b1; add_a = buf_val[m2_i]; add_b = buf_val[m2_j]; add_set = buf_set[m2_i];
      comb_en = 1'b1;
      take_in = in_ok;
      nbuf_v[m2_i] = in_ok; nbuf_val[m2_i] = in_value; nbuf_set[m2_i] = in_set;
      nbuf_v[m2_j] = aout_v && !a_done; nbuf_val[m2_j] = aout_val; nbuf_set[m2_j] = aout_set;
      out_valid = a_done;
    end else if (in_ok && aout_v && in_set == aout_set) begin  // Rule 3
      ev_rule[2] = 1'b1;
      add_v = 1'b1; add_a = in_value; add_b = aout_val; add_set = in_set;
      comb_en = 1'b1;
      take_in = 1'b1;
    end else if (m4_f) begin                          // Rule 4
      ev_rule[3] = 1'b1;
      add_v = 1'b1; add_a = in_value; add_b = buf_val[m4_i]; add_set = in_set;
      comb_en = 1'b1;
      take_in = 1'b1;
      nbuf_v[m4_i] = aout_v && !a_done; nbuf_val[m4_i] = aout_val; nbuf_set[m4_i] = aout_set;
      out_valid = a_done;
    end else if (in_ok && (!aout_v || a_done || free_f)) begin  // Rule 5
      ev_rule[4] = 1'b1;
      add_v = 1'b1; add_a = in_value; add_b = '0; add_set = in_set;
      take_in = 1'b1;
      out_valid = a_done;
      if (aout_v && !a_done) begin
        nbuf_v[free_i] = 1'b1; nbuf_val[free_i] = aout_val; nbuf_set[free_i] = aout_set;
      end
    end else begin                                    // no input accepted
      ev_stall = in_valid;
      if (aout_v) begin
        if (a_done) begin
          out_valid = 1'b1;
        end else if (na_out > CNT_W'(1) && free_f) begin
          nbuf_v[free_i] = 1'b1; nbuf_val[free_i] = aout_val; nbuf_set[free_i] = aout_set;
        end else begin
          ev_recirc = 1'b1;
          add_v = 1'b1; add_a = aout_val; add_b = '0; add_set = aout_set;
        end
      end
    end

    ret_en = out_valid;
    // Drain a lone buffered sum of a closed set when the output is free.
    if (!out_valid && cand_lone) begin
      ev_drain  = 1'b1;
      out_valid = 1'b1;
      out_value = buf_val[cand_i];
      out_set   = buf_set[cand_i];
      ret_en    = 1'b1;
      ret_set   = buf_set[cand_i];
      nbuf_v[cand_i] = 1'b0;
    end
    if (!en) begin
      take_in = 1'b0;
      out_valid = 1'b0;
      ret_en = 1'b0;
      ev_rule = '0; ev_recirc = 1'b0; ev_stall = 1'b0; ev_drain = 1'b0;
    end
  end

  assign in_ready = take_in;

  fp_add #(.LAT(ADD_LAT), .SIDE_W(SET_W)) u_add (
    .clk, .rst_n, .en,
    .in_valid(add_v), .a(add_a), .b(add_b), .in_side(add_set),
    .out_valid(aout_v), .sum(aout_val), .out_side(aout_set)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_v    <= '0;
      buf_val  <= '0;
      buf_set  <= '0;
      open_v   <= 1'b0;
      open_set <= '0;
      inflight <= '0;
    end else if (en) begin
      buf_v    <= nbuf_v;
      buf_val  <= nbuf_val;
      buf_set  <= nbuf_set;
      if (take_in) begin
        open_v   <= !in_last;
        open_set <= in_set;
      end
      inflight <= inflight + ($bits(inflight))'(add_v) - ($bits(inflight))'(aout_v);
    end
  end

  assign idle = (buf_v == '0) && (inflight == '0);

  // A result is only produced when the consumer can take it.
  a_out_ready: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> out_ready);
endmodule
