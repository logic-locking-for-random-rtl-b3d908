// sample_loader: writes the samples streamed in by the host into the
// feature memories.
//
// The host sends the features of one sample after the other, one feature per
// accepted beat of a valid/ready stream (in_valid & in_ready).  The loader
// writes each beat to the next memory word and counts complete samples in
// n_loaded.  It accepts data only while `enable` is high (the accelerator is
// in standby) and the memory still has room for another sample; otherwise
// in_ready is low and the host must hold its beat.  `clear`, given by the
// controller when a batch of samples has been classified, restarts writing
// at word 0 and drops a partly sent sample.
//
// Timing: a beat accepted at a clock edge is written at that same edge
// (wr_en/wr_addr/wr_data are combinational from the stream), and n_loaded
// increments at the edge that accepts the last feature of a sample.
module sample_loader #(
  parameter int unsigned N_SAMPLES  = 16,
  parameter int unsigned N_FEATURES = 784,
  parameter int unsigned FEAT_W     = 8,
  parameter int unsigned ADDR_W     = $clog2(N_SAMPLES * N_FEATURES),
  parameter int unsigned CNT_W      = $clog2(N_SAMPLES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [FEAT_W-1:0] in_data,
  // control
  input  logic              enable,    // accelerator in standby
  input  logic              clear,     // batch finished: start over
  output logic [CNT_W-1:0]  n_loaded,  // complete samples in memory
  // memory write port (shared by all tree copies)
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [FEAT_W-1:0] wr_data
);

  localparam int unsigned FIDX_W = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1;

  logic [ADDR_W-1:0] addr_q;
  logic [FIDX_W-1:0] feat_q;
  logic              last_feat;

  assign in_ready  = enable && !clear && (n_loaded < CNT_W'(N_SAMPLES));
  assign wr_en     = in_valid && in_ready;
  assign wr_addr   = addr_q;
  assign wr_data   = in_data;
  assign last_feat = (feat_q == FIDX_W'(N_FEATURES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      feat_q   <= '0;
      n_loaded <= '0;
    end else if (clear) begin
      addr_q   <= '0;
      feat_q   <= '0;
      n_loaded <= '0;
    end else if (wr_en) begin
      addr_q <= addr_q + 1'b1;
      if (last_feat) begin
        feat_q   <= '0;
        n_loaded <= n_loaded + 1'b1;
      end else begin
        feat_q <= feat_q + 1'b1;
      end
    end
  end

endmodule
