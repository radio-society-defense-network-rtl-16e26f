// matched_filter: compares one recorded keyup with one stored fingerprint.
//
// The filter holds a fingerprint of M signed samples (zero mean, prepared
// off-line) in its own block RAM, written through the fp_we/fp_waddr/fp_wdata
// port while the system boots. The capture itself is not stored here: the
// filter manager broadcasts it to every filter, one sample per clock, in three
// passes tagged by st_phase (see rsdn_pkg):
//
//   PH_MEAN   all N capture samples. The filter sums them; the mean
//             (sum >> log2 N) is subtracted from every later sample to turn
//             the unsigned ADC codes into signed, zero-mean values.
//   PH_CORR   for each lag k = 0..N-M, the window capture[k .. k+M-1] with
//             st_last on its final sample. The filter forms the dot product
//             sum_i fp[i] * (capture[k+i] - mean) and keeps the largest one and
//             its lag (the earliest lag wins a tie).
//   PH_ALIGN  all N capture samples again. Using the best lag k*, the filter
//             accumulates sum_i (fp[i] - (capture[k*+i] - mean))^2 over the
//             aligned window. This sum of squared differences is the
//             similarity score: low for a matching radio, high otherwise.
//
// A `start` pulse clears the filter before a new capture. score_valid rises
// at the end of the ALIGN pass and stays high until the next start.
//
// Pipeline: stream in -> fingerprint RAM read (1 cycle) -> one shared
// multiplier, registered (1 cycle) -> accumulate (1 cycle). The multiplier
// operands are multiplexed by phase, so correlation and scoring use the same
// multiplier; throughput is one sample per clock in every pass. The
// correlation-then-alignment algorithm, mean removal in the filter and the
// score as a sum of squared differences follow the document. Broadcasting the
// capture pass by pass, the widths and the tie rule are this design's own.
module matched_filter
  import rsdn_pkg::*;
#(
  parameter int unsigned N    = 2048,   // capture length (power of two)
  parameter int unsigned M    = 512,    // fingerprint length (M <= N)
  parameter int unsigned SW   = 10,     // capture sample width (unsigned)
  parameter int unsigned FW   = 16,     // fingerprint sample width (signed)
  parameter int unsigned ACCW = SCORE_W // accumulator / score width
) (
  input  logic                      clk,
  input  logic                      rst,
  // fingerprint load port
  input  logic                      fp_we,
  input  logic [$clog2(M)-1:0]      fp_waddr,
  input  logic signed [FW-1:0]      fp_wdata,
  // capture stream
  input  logic                      start,
  input  logic                      st_valid,
  input  logic [SW-1:0]             st_sample,
  input  phase_t                    st_phase,
  input  logic                      st_last,
  // results
  output logic                      score_valid,
  output logic [ACCW-1:0]           score,
  output logic signed [ACCW-1:0]    best_dot,
  output logic [$clog2(N-M+1)-1:0]  best_lag,
  output logic [SW-1:0]             mean_out
);

  localparam int unsigned MA = $clog2(M);
  localparam int unsigned NA = $clog2(N);
  localparam int unsigned LW = $clog2(N - M + 1);
  localparam int unsigned OW = ((FW > SW + 1) ? FW : SW + 1) + 1; // operand width

  // ---------------------------------------------------------------- RAM
  logic signed [FW-1:0] fp_mem [M];
  logic [MA-1:0]        fp_raddr;
  logic signed [FW-1:0] fp_q;

  always_ff @(posedge clk) begin
    if (fp_we) fp_mem[fp_waddr] <= fp_wdata;
    fp_q <= fp_mem[fp_raddr];
  end

  // ---------------------------------------------------------- stage 0
  logic [MA-1:0]    win_idx;     // position inside a correlation window
  logic [NA-1:0]    pos;         // position inside a full-capture pass
  logic [NA+SW-1:0] sum;
  logic [SW-1:0]    mean;
  logic [LW-1:0]    lag_cnt;
  logic             in_win;

  // ALIGN: is capture sample `pos` inside the aligned window?
  logic [NA:0] rel;
  assign rel    = {1'b0, pos} - {{(NA + 1 - LW){1'b0}}, best_lag};
  assign in_win = !rel[NA] && (rel < (NA + 1)'(M));

  always_comb begin
    fp_raddr = win_idx;
    if (st_phase == PH_ALIGN) fp_raddr = rel[MA-1:0];
  end

  // stage 1 registers
  logic          v1, last1, win1;
  phase_t        ph1;
  logic [SW-1:0] s1;

  always_ff @(posedge clk) begin
    if (rst || start) begin
      win_idx <= '0;
      pos     <= '0;
      sum     <= '0;
      v1      <= 1'b0;
      last1   <= 1'b0;
      win1    <= 1'b0;
      ph1     <= PH_MEAN;
      s1      <= '0;
      if (rst) mean <= '0;
    end else begin
      v1    <= st_valid && (st_phase != PH_MEAN);
      ph1   <= st_phase;
      s1    <= st_sample;
      last1 <= st_last;
      win1  <= (st_phase == PH_CORR) || in_win;
      if (st_valid) begin
        case (st_phase)
          PH_MEAN: begin
            if (st_last) begin
              mean <= SW'((sum + (NA + SW)'(st_sample)) >> NA);
              sum  <= '0;
            end else begin
              sum  <= sum + (NA + SW)'(st_sample);
            end
          end
          PH_CORR:  win_idx <= st_last ? '0 : win_idx + 1'b1;
          PH_ALIGN: pos     <= st_last ? '0 : pos + 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign mean_out = mean;

  // ---------------------------------------------------------- stage 1
  // one multiplier, operands chosen by phase
  logic signed [OW-1:0]   centred, fp_ext, diff, op_a, op_b;
  logic signed [2*OW-1:0] prod;
  logic                   v2, last2, win2;
  phase_t                 ph2;

  always_comb begin
    centred = OW'($signed({1'b0, s1})) - OW'($signed({1'b0, mean}));
    fp_ext  = OW'(fp_q);
    diff    = fp_ext - centred;
    if (ph1 == PH_ALIGN) begin
      op_a = diff;
      op_b = diff;
    end else begin
      op_a = fp_ext;
      op_b = centred;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || start) begin
      prod  <= '0;
      v2    <= 1'b0;
      last2 <= 1'b0;
      win2  <= 1'b0;
      ph2   <= PH_MEAN;
    end else begin
      prod  <= op_a * op_b;
      v2    <= v1;
      last2 <= last1;
      win2  <= win1;
      ph2   <= ph1;
    end
  end

  // ---------------------------------------------------------- stage 2
  logic signed [ACCW-1:0] acc, acc_next;
  logic                   have_best;

  assign acc_next = acc + ACCW'(prod);

  always_ff @(posedge clk) begin
    if (rst || start) begin
      acc         <= '0;
      lag_cnt     <= '0;
      have_best   <= 1'b0;
      best_dot    <= '0;
      best_lag    <= '0;
      score       <= '0;
      score_valid <= 1'b0;
    end else if (v2) begin
      if (ph2 == PH_CORR) begin
        if (last2) begin
          acc     <= '0;
          lag_cnt <= lag_cnt + 1'b1;
          if (!have_best || acc_next > best_dot) begin
            best_dot  <= acc_next;
            best_lag  <= lag_cnt;
            have_best <= 1'b1;
          end
        end else begin
          acc <= acc_next;
        end
      end else if (ph2 == PH_ALIGN) begin
        if (last2) begin
          score       <= win2 ? acc_next : acc;
          score_valid <= 1'b1;
          acc         <= '0;
        end else if (win2) begin
          acc <= acc_next;
        end
      end
    end
  end

  initial begin
    assert (M <= N) else $error("matched_filter: fingerprint longer than capture");
    assert ((1 << NA) == N) else $error("matched_filter: N must be a power of two");
  end

endmodule
