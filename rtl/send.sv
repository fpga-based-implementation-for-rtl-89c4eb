// send: cuts a generated packet into 64-bit chunks for the output queues.
//
// On in_new_send (one clock, only taken in WAIT) the module latches the packed
// headers in_alltogether (left-aligned, byte 0 in bit 463), the header size in
// bits, the payload size in bits, the 32-bit payload pattern and the module
// header.  It then writes the packet into its FIFO, one word per clock while
// the FIFO has room:
//   FPGA_HEADER     the module header, ctrl 8'hFF (one clock)
//   HEADER          words made only of header bytes
//   HEADER_PAYLOAD  the one word holding the end of the header and the start
//                   of the payload (only when the header is not a multiple of 8 bytes)
//   PAYLOAD         words of payload: the pattern repeated, starting with its
//                   most significant byte at the first payload byte
//   END             one clock, pulses out_done
// The last word carries ctrl = 1 << (valid bytes - 1) and zeros in its unused
// bytes; all others carry 8'h00.  The FIFO drains to the next stage under
// the NetFPGA push handshake: out_wr is raised only while out_rdy is high,
// and a word moves on every clock where out_wr is high.  The state names
// follow the thesis; the FIFO depth is this design's choice.  A packet of W body words takes W + 3 clocks (WAIT, FPGA_HEADER,
// W words, END) when the FIFO is not full.
module send
  import pktgen_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_new_send,
  input  logic [HDR_BITS-1:0]  in_alltogether,
  input  logic [20:0]          in_bitsofheader,
  input  logic [31:0]          in_payload_size,    // in bits
  input  logic [31:0]          in_payload,
  input  logic [63:0]          in_module_header,
  output logic                 out_done,
  output logic                 busy,
  output logic [63:0]          out_data,
  output logic [7:0]           out_ctrl,
  output logic                 out_wr,
  input  logic                 out_rdy
);
  typedef enum logic [2:0] {WAIT, FPGA_HEADER, HEADER, HEADER_PAYLOAD, PAYLOAD, END} st_t;
  st_t state;

  logic [HDR_BITS-1:0] hdr;          // headers still to send, left-aligned
  logic [17:0]         hdr_left;     // header bytes still to send
  logic [31:0]         tot_left;     // frame bytes still to send
  logic [63:0]         pattern;      // payload pattern aligned to the word lanes
  logic [63:0]         mod_hdr;

  logic        f_full, f_empty, f_afull;
  logic [71:0] f_dout;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic        f_wr;
  logic [71:0] f_din;

  sync_fifo #(.WIDTH(72), .DEPTH(FIFO_DEPTH), .AFULL_SLACK(1)) u_fifo (
    .clk, .rst,
    .wr_en(f_wr), .wr_data(f_din),
    .rd_en(out_wr && out_rdy), .rd_data(f_dout),
    .empty(f_empty), .full(f_full), .almost_full(f_afull), .count(f_count)
  );
  assign out_wr   = !f_empty && out_rdy;
  assign out_ctrl = f_dout[71:64];
  assign out_data = f_dout[63:0];
  assign busy     = (state != WAIT);

  // Byte-lane masks for the word being built.
  logic [3:0]  hdr_n;       // header bytes in this word (0..8)
  logic [3:0]  val_n;       // valid bytes in this word (1..8)
  logic [63:0] hdr_mask, val_mask, word;
  logic        last;
  assign hdr_n    = (hdr_left >= 18'd8) ? 4'd8 : hdr_left[3:0];
  assign val_n    = (tot_left >= 32'd8) ? 4'd8 : tot_left[3:0];
  assign last     = (tot_left <= 32'd8);
  assign hdr_mask = ~(64'hFFFF_FFFF_FFFF_FFFF >> (8 * hdr_n));
  assign val_mask = ~(64'hFFFF_FFFF_FFFF_FFFF >> (8 * val_n));
  assign word     = ((hdr[HDR_BITS-1 -: 64] & hdr_mask) | (pattern & ~hdr_mask)) & val_mask;

  // Word type of the next word once this one is written.
  function automatic st_t kind(input logic [17:0] hl);
    if (hl >= 18'd8)      return HEADER;
    else if (hl != 18'd0) return HEADER_PAYLOAD;
    else                  return PAYLOAD;
  endfunction

  logic [17:0] hdr_bytes_in;
  assign hdr_bytes_in = in_bitsofheader[20:3];

  always_comb begin
    f_wr  = 1'b0;
    f_din = '0;
    unique case (state)
      FPGA_HEADER: begin
        f_wr  = !f_full;
        f_din = {CTRL_MODHDR, mod_hdr};
      end
      HEADER, HEADER_PAYLOAD, PAYLOAD: begin
        f_wr  = !f_full;
        f_din = {last ? eop_ctrl(val_n) : CTRL_BODY, word};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= WAIT;
      hdr      <= '0;
      hdr_left <= '0;
      tot_left <= '0;
      pattern  <= '0;
      mod_hdr  <= '0;
      out_done <= 1'b0;
    end else begin
      out_done <= 1'b0;
      unique case (state)
        WAIT: if (in_new_send) begin
          hdr      <= in_alltogether;
          hdr_left <= hdr_bytes_in;
          tot_left <= 32'(hdr_bytes_in) + (in_payload_size >> 3);
          mod_hdr  <= in_module_header;
          // Rotate the doubled pattern so that payload byte 0 (pattern byte 0)
          // lands on the lane right after the last header byte.
          pattern  <= {in_payload, in_payload} >> (8 * hdr_bytes_in[1:0])
                    | {in_payload, in_payload} << (64 - 8 * hdr_bytes_in[1:0]);
          state    <= FPGA_HEADER;
        end
        FPGA_HEADER: if (!f_full) begin
          state <= (tot_left == 0) ? END : kind(hdr_left);
        end
        HEADER, HEADER_PAYLOAD, PAYLOAD: if (!f_full) begin
          hdr      <= hdr << 64;
          hdr_left <= hdr_left - 18'(hdr_n);
          tot_left <= tot_left - 32'(val_n);
          state    <= last ? END : kind(hdr_left - 18'(hdr_n));
        end
        END: begin
          out_done <= 1'b1;
          state    <= WAIT;
        end
        default: state <= WAIT;
      endcase
    end
  end
endmodule
