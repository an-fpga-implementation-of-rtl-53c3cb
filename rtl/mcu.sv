// mcu: main controller of the embedder/extractor.
//
// A set of counters and a small state machine that sequence the other units
// for four operations, chosen by `op` when `start` is pulsed while idle:
//
//  OP_LOAD    Accepts NPIX RGB pixels (`pix_in_valid`/`pix_in_ready`), in
//             raster order. The colour converter's results are written to the
//             three plane RAMs at a sequential address counter.
//  OP_EMBED   Reloads the address LFSR seeds, then runs the message through
//             a pipeline of 2-bit steps. Clock cycles alternate between a read
//             phase and a write phase, because the plane RAMs are single-port.
//             In a read phase a step is issued if its two bits are at hand (a
//             new message byte is taken from `msg_in_valid`/`msg_in_ready`
//             when the previous one is used up; bits are taken MSB first): the
//             three planes are read at the random addresses and the LFSRs
//             advance. The pixels and bits enter the 3-stage embed unit one
//             cycle later; its result is held one cycle and written back to Cb
//             and Cr in a write phase, at the addresses the step was read from
//             (`wr_embed`; the top keeps those addresses in a 5-cycle delay
//             line). One step completes every 2 cycles while the message
//             stream keeps up; read to write-back takes 6 cycles. Steps can
//             overlap without hazards: a write changes only bit 0 of Cb/Cr,
//             and no step reads those bits (Y is never written), so the
//             in-order writes give the same planes as strictly sequential
//             steps.
//  OP_UNLOAD  Reads all NPIX words of the planes in raster order, one per
//             clock, through the inverse colour converter; each RGB result is
//             flagged by `rgb_out_valid` with its pixel index `rgb_out_addr`
//             (the address for the off-chip stego image memories).
//  OP_EXTRACT Reloads the seeds and reads the planes at the random addresses,
//             one step per clock, through the extract unit; every four steps
//             give one message byte on `msg_out_valid` / `msg_out_byte` with
//             its index `msg_out_addr` (for the off-chip message memory).
//
// The message length `msg_len` (bytes) is the "text end" test of the
// method's flow charts; the "image end" test stops a run after NPIX steps, in
// which case `img_end` is set for that run. `done` pulses for one clock at
// the end of every operation. The split into four operations, the handshakes,
// the MSB-first bit order and the cycle counts are this design's choices; the
// method describes the controller only as counters that synchronise the units.
module mcu
  import stego_pkg::*;
#(
  parameter int unsigned AW    = ADDR_W,        // plane address width
  parameter int unsigned LEN_W = ADDR_W - 1     // message length width (bytes)
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start,
  input  op_e              op,
  input  logic [LEN_W-1:0] msg_len,
  output logic             busy,
  output logic             done,
  output logic             img_end,
  // image input stream
  input  logic             pix_in_valid,
  output logic             pix_in_ready,
  // message input stream
  input  logic             msg_in_valid,
  input  pix_t             msg_in_byte,
  output logic             msg_in_ready,
  // address generator
  output logic             ag_load,
  output logic             ag_step,
  // plane RAM control
  output logic             addr_seq,      // 1: sequential address, 0: random
  output logic [AW-1:0]    seq_addr,
  output logic             wr_load,       // write converter result to all planes
  output logic             wr_embed,      // write embed result to Cb and Cr
  // colour converters
  input  logic             csc_out_valid,
  output logic             icsc_in_valid,
  input  logic             icsc_out_valid,
  output logic             rgb_out_valid,
  output logic [AW-1:0]    rgb_out_addr,
  // embed unit
  output logic             seu_in_valid,
  output logic             seu_b1,
  output logic             seu_b2,
  input  logic             seu_out_valid,
  // extract unit
  output logic             dseu_in_valid,
  input  logic             dseu_out_valid,
  input  logic             dseu_b1,
  input  logic             dseu_b2,
  output logic             msg_out_valid,
  output pix_t             msg_out_byte,
  output logic [LEN_W-1:0] msg_out_addr
);

  localparam logic [AW:0] NPIX = (AW+1)'(2**AW);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_UNLOAD, S_EMB, S_EXT, S_DONE
  } state_e;

  state_e      state;
  logic [AW:0] cnt_a, cnt_b;     // issue / completion counters
  logic [AW:0] total;            // steps of the current embed/extract run
  pix_t        cur_byte;         // message byte being embedded (MSB first)
  logic [1:0]  sub;              // 2-bit step within the byte
  pix_t        rx_byte;          // message byte being extracted
  logic        rd_q;             // a read was issued last cycle
  logic        ph;               // embed: 0 = read phase, 1 = write phase
  logic        emb_issue;        // embed: a step is read this cycle
  logic [1:0]  emb_bits, bits_q; // embed: bits of the step issued / in the unit
  logic        wr_q;             // embed: unit result held for write-back

  logic [LEN_W+1:0] steps_wanted;
  always_comb steps_wanted = {msg_len, 2'b00};

  // ---------------------------------------------------------------- outputs
  always_comb begin
    busy          = (state != S_IDLE);
    pix_in_ready  = (state == S_LOAD) && (cnt_a < NPIX);
    msg_in_ready  = (state == S_EMB) && !ph && (sub == 2'd0) && (cnt_a < total);
    emb_issue     = (state == S_EMB) && !ph && (cnt_a < total) && ((sub != 2'd0) || msg_in_valid);
    emb_bits      = (sub == 2'd0) ? msg_in_byte[7:6] : cur_byte[7:6];
    addr_seq      = (state == S_LOAD) || (state == S_UNLOAD);
    seq_addr      = (state == S_LOAD) ? cnt_b[AW-1:0] : cnt_a[AW-1:0];
    wr_load       = (state == S_LOAD) && csc_out_valid;
    wr_embed      = (state == S_EMB) && wr_q;
    seu_in_valid  = (state == S_EMB) && rd_q;
    seu_b1        = bits_q[1];
    seu_b2        = bits_q[0];
    ag_load       = start && (state == S_IDLE) && (op == OP_EMBED || op == OP_EXTRACT);
    ag_step       = emb_issue || ((state == S_EXT) && (cnt_a < total));
    icsc_in_valid = (state == S_UNLOAD) && rd_q;
    dseu_in_valid = (state == S_EXT) && rd_q;
    rgb_out_valid = (state == S_UNLOAD) && icsc_out_valid;
    rgb_out_addr  = cnt_b[AW-1:0];
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cnt_a         <= '0;
      cnt_b         <= '0;
      total         <= '0;
      cur_byte      <= '0;
      rx_byte       <= '0;
      sub           <= '0;
      rd_q          <= 1'b0;
      ph            <= 1'b0;
      bits_q        <= '0;
      wr_q          <= 1'b0;
      done          <= 1'b0;
      img_end       <= 1'b0;
      msg_out_valid <= 1'b0;
      msg_out_byte  <= '0;
      msg_out_addr  <= '0;
    end else begin
      done          <= 1'b0;
      msg_out_valid <= 1'b0;
      rd_q          <= 1'b0;
      wr_q          <= seu_out_valid;
      ph            <= (state == S_EMB) ? !ph : 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cnt_a <= '0;
          cnt_b <= '0;
          sub   <= '0;
          // "image end": a run never takes more steps than the plane has pixels
          if ((AW+LEN_W+2)'(steps_wanted) > (AW+LEN_W+2)'(NPIX)) begin
            total   <= NPIX;
            img_end <= (op == OP_EMBED) || (op == OP_EXTRACT);
          end else begin
            total   <= (AW+1)'(steps_wanted);
            img_end <= 1'b0;
          end
          unique case (op)
            OP_LOAD:    state <= S_LOAD;
            OP_EMBED:   state <= S_EMB;
            OP_UNLOAD:  state <= S_UNLOAD;
            OP_EXTRACT: state <= S_EXT;
            default:    state <= S_IDLE;
          endcase
        end

        S_LOAD: begin
          if (pix_in_valid && pix_in_ready) cnt_a <= cnt_a + 1'b1;
          if (csc_out_valid) begin
            cnt_b <= cnt_b + 1'b1;
            if (cnt_b == NPIX - 1'b1) state <= S_DONE;
          end
        end

        S_UNLOAD: begin
          if (cnt_a < NPIX) begin
            cnt_a <= cnt_a + 1'b1;
            rd_q  <= 1'b1;
          end
          if (icsc_out_valid) begin
            cnt_b <= cnt_b + 1'b1;
            if (cnt_b == NPIX - 1'b1) state <= S_DONE;
          end
        end

        S_EMB: begin
          if (emb_issue) begin
            cnt_a    <= cnt_a + 1'b1;
            sub      <= sub + 1'b1;
            rd_q     <= 1'b1;
            bits_q   <= emb_bits;
            cur_byte <= (sub == 2'd0) ? {msg_in_byte[5:0], 2'b00} : {cur_byte[5:0], 2'b00};
          end
          if (wr_embed) begin
            cnt_b <= cnt_b + 1'b1;
            if (cnt_b == total - 1'b1) state <= S_DONE;
          end
          if (total == '0) state <= S_DONE;
        end

        S_EXT: begin
          if (cnt_a < total) begin
            cnt_a <= cnt_a + 1'b1;
            rd_q  <= 1'b1;
          end
          if (dseu_out_valid) begin
            cnt_b   <= cnt_b + 1'b1;
            rx_byte <= {rx_byte[5:0], dseu_b1, dseu_b2};
            if (cnt_b[1:0] == 2'd3) begin
              msg_out_valid <= 1'b1;
              msg_out_byte  <= {rx_byte[5:0], dseu_b1, dseu_b2};
              msg_out_addr  <= LEN_W'(cnt_b >> 2);
            end
            if (cnt_b == total - 1'b1) state <= S_DONE;
          end
          if (total == '0) state <= S_DONE;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  // Single-port rule: an embed write-back never shares a cycle with a read,
  // and it always falls in a write phase.
  a_single_port: assert property (@(posedge clk) disable iff (!rst_n) !(wr_embed && emb_issue));
  a_write_phase: assert property (@(posedge clk) disable iff (!rst_n) wr_embed |-> ph);
  // A run never completes more steps than it issued.
  a_in_order:    assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_EMB || state == S_EXT) |-> cnt_b <= cnt_a);

endmodule
