// capture_buffer: the long buffer that records a transmission's keyup.
//
// While armed, the buffer waits for a trigger pulse from the trigger
// detector. It then writes the next N samples of the ADC stream to addresses
// 0..N-1 of a block RAM and raises `full`. The contents stay frozen, readable
// through a registered read port (data one cycle after the address), until a
// `release_buf` pulse re-arms the buffer. Triggers that arrive while
// recording or full are ignored. Recording the samples after the trigger
// follows the document; the length N, the hold-until-release protocol and the
// read port are this design's own choices.
module capture_buffer #(
  parameter int unsigned SW = 10,     // sample width
  parameter int unsigned N  = 2048    // samples per capture
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 s_tvalid,
  input  logic [SW-1:0]        s_tdata,
  input  logic                 trigger,
  input  logic                 release_buf,
  output logic                 recording,
  output logic                 full,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic [SW-1:0]        rd_data
);

  localparam int unsigned AW = $clog2(N);

  typedef enum logic [1:0] {C_ARMED, C_REC, C_FULL} state_t;
  state_t state;

  logic [SW-1:0] mem [N];
  logic [AW-1:0] wr_ptr;
  logic          we;

  assign we        = (state == C_REC) && s_tvalid;
  assign recording = (state == C_REC);
  assign full      = (state == C_FULL);

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr] <= s_tdata;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_ARMED;
      wr_ptr <= '0;
    end else begin
      case (state)
        C_ARMED: if (trigger) begin
          wr_ptr <= '0;
          state  <= C_REC;
        end
        C_REC: if (s_tvalid) begin
          wr_ptr <= wr_ptr + 1'b1;
          if (wr_ptr == AW'(N - 1)) state <= C_FULL;
        end
        C_FULL: if (release_buf) state <= C_ARMED;
        default: state <= C_ARMED;
      endcase
    end
  end

endmodule
