// global_logic: frame receiver and scan-chain demultiplexer.
//
// The demodulated data stream arrives one bit per 20 MHz clock. A frame is an
// 8-bit header followed by N_COLS column words D0..D15, each 128 bits
// (16 bits for each of the 8 blocks) followed by its CRC8. With the default
// sizes a frame is 8 + 16 x (128 + 8) = 2184 bits, i.e. 109.2 us at 20 Mb/s:
// exactly one stimulation time step.
//
// How it works: in HUNT the receiver slides an 8-bit window over the stream
// until it equals HEADER. It then shifts each column word into a capture
// register while computing its CRC8, and compares the CRC that follows. A good
// word is copied to a dispatch register and shifted out, 16 bits per block,
// onto the 8 scan chains in parallel (shift_en high for 16 cycles, MSB first;
// the first 16 bits of a word go to block 0). Because D0 is shifted first it
// ends up in the stimulator farthest down each chain (column c0). After the
// last word has been dispatched, `load` pulses so every stimulator copies its
// scan stage into its input register. A CRC mismatch discards the whole frame:
// `chain_clr` pulses, then `load`, so every stimulator receives zero input, and
// the receiver returns to HUNT.
//
// The local logic's low-rate clock is produced here as a one-cycle `tick`
// every TICK_DIV cycles (20 MHz / 2184 = 9.16 kHz). A load re-aligns it so
// that the tick falls on the cycle after each load (a tick that would
// coincide with a load is moved to the next cycle).
//
// Frame layout, header and bit orders follow the document's figure of the
// protocol where it prints them (header, Dx = 128 bits per column, CRC8 after
// each Dx, 8 chains); the header value, CRC polynomial, bit orders and the
// tick generation are this design's own choices.
module global_logic
  import epi_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 8,
  parameter int unsigned N_COLS   = 16,
  parameter int unsigned TICK_DIV = HDR_W + N_COLS * (N_BLOCKS * WORD_W + CRC_W)
) (
  input  logic                clk,        // 20 MHz recovered clock
  input  logic                rst_n,
  input  logic                rx_data,    // demodulated bit stream, one bit per clock
  output logic [N_BLOCKS-1:0] sdata,      // scan-chain data, one per block
  output logic                shift_en,   // all chains shift this cycle
  output logic                chain_clr,  // clear all scan stages
  output logic                load,       // stimulators latch their scan stage
  output logic                tick,       // local-logic clock enable
  output logic                frame_ok,   // pulse: a complete frame was loaded
  output logic                crc_err     // pulse: a column word failed its CRC
);

  localparam int unsigned DX_W  = N_BLOCKS * WORD_W;
  localparam int unsigned CNT_W = $clog2(DX_W + 1);
  localparam int unsigned COL_W = (N_COLS > 1) ? $clog2(N_COLS) : 1;
  localparam int unsigned TCK_W = $clog2(TICK_DIV + 1);

  typedef enum logic [1:0] {RX_HUNT, RX_DATA, RX_CRC} rx_state_t;

  rx_state_t              state_q;
  logic [HDR_W-2:0]       hdr_q;     // last HDR_W-1 bits; the window is {hdr_q, rx_data}
  logic [3:0]             hdr_cnt_q;
  logic [DX_W-1:0]        cap_q;
  logic [CRC_W-1:0]       crc_q;
  logic [CRC_W-2:0]       crc_rx_q;  // CRC bits received so far
  logic [CNT_W-1:0]       bit_cnt_q;
  logic [COL_W-1:0]       col_q;
  logic [DX_W-1:0]        disp_q;
  logic [4:0]             disp_cnt_q;
  logic                   load_pend_q;
  logic                   err_load_q;
  logic                   frame_load_q;
  logic [TCK_W-1:0]       tick_cnt_q;

  logic [HDR_W-1:0] hdr_next;
  logic [CRC_W-1:0] crc_rx_next;
  logic             crc_done, crc_good, last_col;

  assign hdr_next    = {hdr_q, rx_data};
  assign crc_rx_next = {crc_rx_q, rx_data};
  assign crc_done    = (state_q == RX_CRC) && (bit_cnt_q == CNT_W'(CRC_W - 1));
  assign crc_good    = crc_done && (crc_rx_next == crc_q);
  assign last_col    = (col_q == COL_W'(N_COLS - 1));

  // Receiver
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= RX_HUNT;
      hdr_q     <= '0;
      hdr_cnt_q <= '0;
      cap_q     <= '0;
      crc_q     <= '0;
      crc_rx_q  <= '0;
      bit_cnt_q <= '0;
      col_q     <= '0;
    end else begin
      unique case (state_q)
        RX_HUNT: begin
          hdr_q <= hdr_next[HDR_W-2:0];
          if (hdr_cnt_q != 4'(HDR_W)) hdr_cnt_q <= hdr_cnt_q + 1'b1;
          if (hdr_cnt_q >= 4'(HDR_W - 1) && hdr_next == HEADER) begin
            state_q   <= RX_DATA;
            col_q     <= '0;
            bit_cnt_q <= '0;
            crc_q     <= '0;
          end
        end
        RX_DATA: begin
          cap_q     <= {cap_q[DX_W-2:0], rx_data};
          crc_q     <= crc8_step(crc_q, rx_data);
          if (bit_cnt_q == CNT_W'(DX_W - 1)) begin
            bit_cnt_q <= '0;
            state_q   <= RX_CRC;
          end else begin
            bit_cnt_q <= bit_cnt_q + 1'b1;
          end
        end
        RX_CRC: begin
          crc_rx_q  <= crc_rx_next[CRC_W-2:0];
          bit_cnt_q <= bit_cnt_q + 1'b1;
          if (crc_done) begin
            bit_cnt_q <= '0;
            crc_q     <= '0;
            if (crc_good && !last_col) begin
              col_q   <= col_q + 1'b1;
              state_q <= RX_DATA;
            end else begin
              state_q   <= RX_HUNT;
              hdr_cnt_q <= '0;
              hdr_q     <= '0;
            end
          end
        end
        default: state_q <= RX_HUNT;
      endcase
    end
  end

  // Dispatch of accepted column words onto the chains, and frame load.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_q      <= '0;
      disp_cnt_q  <= '0;
      load_pend_q <= 1'b0;
      err_load_q  <= 1'b0;
      frame_load_q <= 1'b0;
    end else begin
      err_load_q   <= 1'b0;
      frame_load_q <= 1'b0;
      if (crc_good) begin
        disp_q      <= cap_q;
        disp_cnt_q  <= 5'(WORD_W);
        load_pend_q <= last_col;
      end else if (crc_done) begin
        // Discard the frame: stop dispatching, clear the chains, then load zeros.
        disp_cnt_q  <= '0;
        load_pend_q <= 1'b0;
        err_load_q  <= 1'b1;
      end else if (disp_cnt_q != '0) begin
        for (int b = 0; b < int'(N_BLOCKS); b++)
          disp_q[(N_BLOCKS-1-b)*WORD_W +: WORD_W] <=
            {disp_q[(N_BLOCKS-1-b)*WORD_W +: WORD_W-1], 1'b0};
        disp_cnt_q <= disp_cnt_q - 1'b1;
        if (disp_cnt_q == 5'd1) begin
          load_pend_q  <= 1'b0;
          frame_load_q <= load_pend_q;
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < int'(N_BLOCKS); b++)
      sdata[b] = disp_q[(N_BLOCKS-1-b)*WORD_W + WORD_W - 1];
  end

  assign shift_en  = (disp_cnt_q != '0);
  assign chain_clr = crc_done && !crc_good;
  assign crc_err   = chain_clr;
  assign frame_ok  = frame_load_q;
  assign load      = frame_ok || err_load_q;

  // Local-logic tick, re-aligned by every load.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 tick_cnt_q <= '0;
    else if (load)                              tick_cnt_q <= TCK_W'(TICK_DIV - 1);
    else if (tick_cnt_q == TCK_W'(TICK_DIV - 1)) tick_cnt_q <= '0;
    else                                        tick_cnt_q <= tick_cnt_q + 1'b1;
  end
  assign tick = (tick_cnt_q == TCK_W'(TICK_DIV - 1)) && !load;

endmodule
