// max_network: MAX network of the scheduler.
//
// Takes the priority vector (one key per VC; a key is {kind, priority}, so
// the comparison orders classes first and priorities within a class) and
// returns the highest key and the index of the VC that offered it. It is a
// tree of two-input compare/select stages, one register stage per level, so
// a result leaves log2(N) clocks after in_valid; the pipeline takes a new
// vector every clock. On equal keys the lower VC index wins (this design's
// choice). N must be a power of two and at least 2.
module max_network #(
  parameter int N     = 4,
  parameter int KEY_W = 15,
  localparam int IDW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][KEY_W-1:0] keys,
  output logic                out_valid,
  output logic [KEY_W-1:0]    max_key,
  output logic [IDW-1:0]      max_id
);

  localparam int L = $clog2(N);

  // k_q[l][i] / id_q[l][i]: entry i of level l (level l has N >> l entries)
  logic [KEY_W-1:0] k_q  [1:L][N];
  logic [IDW-1:0]   id_q [1:L][N];
  logic             v_q  [1:L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l <= L; l++) begin
        v_q[l] <= 1'b0;
        for (int i = 0; i < N; i++) begin
          k_q[l][i]  <= '0;
          id_q[l][i] <= '0;
        end
      end
    end else begin
      // level 1 from the input vector
      v_q[1] <= in_valid;
      for (int i = 0; i < N / 2; i++) begin
        if (keys[2*i+1] > keys[2*i]) begin
          k_q[1][i]  <= keys[2*i+1];
          id_q[1][i] <= IDW'(2*i+1);
        end else begin
          k_q[1][i]  <= keys[2*i];
          id_q[1][i] <= IDW'(2*i);
        end
      end
      // deeper levels
      for (int l = 2; l <= L; l++) begin
        v_q[l] <= v_q[l-1];
        for (int i = 0; i < (N >> l); i++) begin
          if (k_q[l-1][2*i+1] > k_q[l-1][2*i]) begin
            k_q[l][i]  <= k_q[l-1][2*i+1];
            id_q[l][i] <= id_q[l-1][2*i+1];
          end else begin
            k_q[l][i]  <= k_q[l-1][2*i];
            id_q[l][i] <= id_q[l-1][2*i];
          end
        end
      end
    end
  end

  assign out_valid = v_q[L];
  assign max_key   = k_q[L][0];
  assign max_id    = id_q[L][0];

endmodule
