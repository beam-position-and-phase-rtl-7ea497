// acq_buffer: triggered acquisition of the processed data into four blocks
// of BLOCK_LEN samples, read out by the host.
//
// A rising edge of the low-rate acquisition trigger arms the buffer; the
// next rising edge of the storage ring revolution clock starts the capture,
// so every acquisition begins at the same point of the turn. Each stored
// record fills one address in all four blocks at once: block 0 the sum
// amplitude, block 1 the horizontal position, block 2 the vertical position,
// block 3 the phase; with amp_mode = 1 the blocks hold instead the four
// electrode amplitudes A, B, C, D. In full-rate mode (turn_mode = 0) every processed
// sample is stored, 2048 samples covering 32 turns. In turn-by-turn mode
// (turn_mode = 1) one sample per turn is stored, the one turn_offset samples
// after the revolution edge; with 64 samples per turn the offset picks one
// of the 64 sample slots, i.e. one bunch and sampling phase in the 16-bunch
// filling. After BLOCK_LEN records done is raised until the next trigger.
// A trigger during a capture is ignored.
//
// Four blocks of 2048 processed samples, and their start on the revolution
// clock after an acquisition trigger, follow the document. The choice of the
// four quantities (either set), the turn-by-turn mode and the host read port
// are this design's own. turn_mode and amp_mode are latched when the
// capture starts; turn_offset is read at every revolution edge.
//
// Interface: rev_clk and acq_trig are asynchronous levels, synchronised
// here (edge_sync). in/in_valid is the processed stream. Host read:
// host_data shows word host_addr of block host_blk one clock after both
// are presented (synchronous block RAM read).
module acq_buffer
  import bpm_pkg::proc_sample_t, bpm_pkg::sum_word, bpm_pkg::quantity_e,
         bpm_pkg::SEL_SUM, bpm_pkg::SEL_X, bpm_pkg::SEL_Y, bpm_pkg::SEL_PHASE;
#(
  parameter int BLOCK_LEN = 2048,
  parameter int N_BLOCKS  = 4,
  parameter int DATA_W    = 16,
  parameter int OFF_W     = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         rev_clk,
  input  logic                         acq_trig,
  input  logic                         turn_mode,
  input  logic                         amp_mode,
  input  logic [OFF_W-1:0]             turn_offset,
  input  logic                         in_valid,
  input  proc_sample_t                 in,
  input  logic [$clog2(N_BLOCKS)-1:0]  host_blk,
  input  logic [$clog2(BLOCK_LEN)-1:0] host_addr,
  output logic [DATA_W-1:0]            host_data,
  output logic                         busy,
  output logic                         done,
  output logic                         armed,
  output logic                         rev_seen   // one-clock pulse per synchronised revolution edge
);

  localparam int AW = $clog2(BLOCK_LEN);
  localparam int BW = $clog2(N_BLOCKS);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_CAPTURE, S_DONE} state_e;
  state_e state;

  logic rev_p, trig_p;
  edge_sync u_rev  (.clk, .rst_n, .async_in(rev_clk),  .rise(rev_p));
  edge_sync u_trig (.clk, .rst_n, .async_in(acq_trig), .rise(trig_p));

  logic [AW-1:0]    wr_addr;
  logic             mode_q;     // turn_mode latched at the start
  logic             amp_q;      // amp_mode latched at the start
  logic             pend;       // turn mode: this turn's sample not yet taken
  logic [OFF_W-1:0] cnt;        // turn mode: samples still to skip
  logic             take;       // store the current input
  logic [DATA_W-1:0] words [N_BLOCKS];

  // The processed record split into block words.
  always_comb begin
    for (int b = 0; b < N_BLOCKS; b++) begin
      if (amp_q)
        words[b] = DATA_W'(in.amp[b % 4]);
      else unique case (quantity_e'(b[1:0]))
        SEL_SUM:   words[b] = sum_word(in.sum);
        SEL_X:     words[b] = DATA_W'(in.x);
        SEL_Y:     words[b] = DATA_W'(in.y);
        SEL_PHASE: words[b] = DATA_W'(in.phase);
        default:   words[b] = '0;
      endcase
    end
  end

  always_comb begin
    take = 1'b0;
    if (state == S_CAPTURE && in_valid)
      take = mode_q ? (pend && cnt == '0) : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wr_addr <= '0;
      mode_q  <= 1'b0;
      amp_q   <= 1'b0;
      pend    <= 1'b0;
      cnt     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (trig_p) state <= S_ARMED;
        S_ARMED: if (rev_p) begin
          state   <= S_CAPTURE;
          wr_addr <= '0;
          mode_q  <= turn_mode;
          amp_q   <= amp_mode;
          pend    <= 1'b1;
          cnt     <= turn_offset;
        end
        S_CAPTURE: begin
          if (mode_q && rev_p) begin
            pend <= 1'b1;
            cnt  <= turn_offset;
          end else if (mode_q && pend && in_valid) begin
            if (cnt == '0) pend <= 1'b0;
            else           cnt  <= cnt - 1'b1;
          end
          if (take) begin
            wr_addr <= wr_addr + 1'b1;
            if (wr_addr == AW'(BLOCK_LEN - 1)) state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Block memories: one write port (all blocks at the same address), one
  // synchronous read port for the host.
  logic [DATA_W-1:0] mem [N_BLOCKS][BLOCK_LEN];
  logic [DATA_W-1:0] rd_q [N_BLOCKS];
  logic [BW-1:0]     blk_q;

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_mem
    always_ff @(posedge clk) begin
      if (take) mem[b][wr_addr] <= words[b];
      rd_q[b] <= mem[b][host_addr];
    end
  end

  always_ff @(posedge clk) blk_q <= host_blk;

  assign host_data = rd_q[blk_q];
  assign busy      = (state == S_CAPTURE);
  assign done      = (state == S_DONE);
  assign armed     = (state == S_ARMED);
  assign rev_seen  = rev_p;

  // A finished capture has filled exactly BLOCK_LEN records (the write
  // address has wrapped to zero) and writes nothing more.
  assert property (@(posedge clk) state == S_DONE |-> wr_addr == '0 && !take);

endmodule
