// scn_classifier: clustered-neural-network classifier that picks which CAM
// sub-blocks a search must compare-enable.
//
// The network has two parts. PI has C = Q/KAPPA clusters of L = 2**KAPPA
// binary neurons. A tag is cut down to its Q least significant bits, that
// reduced tag is split into C partitions of KAPPA bits, and partition k
// activates neuron number <partition value> of cluster k (a direct
// binary-to-integer map), so exactly one neuron per cluster is active. PII has
// one binary neuron per CAM entry. Between PI and PII sits a binary connection
// matrix of (C*L) x ENTRIES bits; there are no connections inside PI.
//
// Training (`train_en`): the column of PII neuron `train_addr` is overwritten
// with the PI pattern of `train_tag`, i.e. connections are set from the active
// PI neuron of every cluster to that PII neuron and cleared elsewhere in the
// column. Decoding (`query_en`): PII neuron j fires when it is connected to
// the active neuron of every cluster. The PII neurons of each group of
// ENTRIES/NSB consecutive entries are ORed into the compare-enable of that
// group's CAM sub-block. Since only part of the tag is used, several PII
// neurons may fire; the CAM compare that follows resolves the ambiguity.
//
// Timing: decoding is combinational from `query_tag`; `sb_en` and `pii` are
// registered, valid the cycle after `query_en`, and read zero after a cycle
// without a query. A training write takes effect at the clock edge. A search
// and a training write must not be issued in the same cycle (asserted).
// Reset trains the network with the preset table when PRESET is set.
//
// The PI/PII structure, the partition into clusters, the binary connections
// and the OR grouping follow the design. The values of Q and KAPPA, the choice
// of the least significant bits as the reduced tag, column overwrite on
// retraining and the output register are this implementation's choices.
module scn_classifier #(
  parameter int unsigned ENTRIES = scn_cam_pkg::CAM_ENTRIES,
  parameter int unsigned WIDTH   = scn_cam_pkg::CAM_WIDTH,
  parameter int unsigned Q       = scn_cam_pkg::CAM_Q,
  parameter int unsigned KAPPA   = scn_cam_pkg::CAM_KAPPA,
  parameter int unsigned NSB     = scn_cam_pkg::CAM_NSB,
  parameter bit          PRESET  = 1'b1,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               train_en,
  input  logic [AW-1:0]      train_addr,
  input  logic [WIDTH-1:0]   train_tag,
  input  logic               query_en,
  input  logic [WIDTH-1:0]   query_tag,
  output logic [NSB-1:0]     sb_en,
  output logic [ENTRIES-1:0] pii
);

  localparam int unsigned C   = Q / KAPPA;
  localparam int unsigned L   = 1 << KAPPA;
  localparam int unsigned RPS = ENTRIES / NSB;

  typedef logic [C*L-1:0] pi_vec_t;

  // PI activation pattern of a tag: one-hot per cluster.
  function automatic pi_vec_t pi_pattern(logic [WIDTH-1:0] tag);
    pi_vec_t p;
    logic [KAPPA-1:0] part;
    p = '0;
    for (int unsigned k = 0; k < C; k++) begin
      part = tag[k*KAPPA +: KAPPA];
      p[k*L + int'(part)] = 1'b1;
    end
    return p;
  endfunction

  function automatic pi_vec_t preset_pattern(int unsigned j);
    logic [63:0] w;
    w = scn_cam_pkg::preset_word(j, ENTRIES, WIDTH);
    return pi_pattern(w[WIDTH-1:0]);
  endfunction

  // Connection matrix, one column (C*L bits) per PII neuron.
  pi_vec_t conn [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < ENTRIES; j++)
        conn[j] <= PRESET ? preset_pattern(j) : '0;
    end else if (train_en) begin
      conn[train_addr] <= pi_pattern(train_tag);
    end
  end

  pi_vec_t              pi_act;
  logic [ENTRIES-1:0]   pii_d;
  logic [NSB-1:0]       sb_d;

  always_comb begin
    pi_act = pi_pattern(query_tag);
    for (int unsigned j = 0; j < ENTRIES; j++) begin
      // Fires when every cluster's active neuron connects to neuron j.
      pii_d[j] = ((conn[j] & pi_act) == pi_act);
    end
    for (int unsigned s = 0; s < NSB; s++)
      sb_d[s] = |pii_d[s*RPS +: RPS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_en <= '0;
      pii   <= '0;
    end else if (query_en) begin
      sb_en <= sb_d;
      pii   <= pii_d;
    end else begin
      sb_en <= '0;
      pii   <= '0;
    end
  end

  initial begin
    assert (KAPPA > 0 && Q % KAPPA == 0 && Q <= WIDTH)
      else $error("scn_classifier: Q must be a multiple of KAPPA and at most WIDTH");
    assert (NSB > 0 && ENTRIES % NSB == 0)
      else $error("scn_classifier: ENTRIES must be a multiple of NSB");
  end

  a_no_train_during_query: assert property (@(posedge clk) disable iff (!rst_n)
    !(train_en && query_en));

endmodule
