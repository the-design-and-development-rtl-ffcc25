// udp_tx: turns buffered radar samples into UDP packets for the Ethernet MAC.
//
// Every packet has the same shape, fixed when the design is built: a
// 14-byte Ethernet header, a 20-byte IPv4 header and an 8-byte UDP header,
// all taken from parameters (addresses, ports), then a payload of a 16-bit
// pulse number followed by PAYLOAD_WORDS 32-bit samples. With the default of
// 125 samples the UDP payload is 502 bytes and the frame 544 bytes before the
// MAC adds preamble and CRC. The IPv4 header checksum is computed from the
// parameters when the design is elaborated; the UDP checksum is sent as zero
// ("not used"), which IPv4 allows. Multi-byte fields and samples are sent
// most significant byte first.
//
// Control: the block waits until the output FIFO holds a full payload and
// then sends one packet. A flush request (one pulse per received radar
// pulse, from the receiver's rx_done) makes it send whatever the FIFO holds,
// even less than a payload, padded with zero samples, so that no pulse waits
// in the buffer for the next one. If data arrives faster than it can be sent,
// the padding can be replaced by the start of the next pulse; that is the
// limit on pulse rate times pulse length.
//
// The byte stream towards the MAC uses valid/ready: mac_data moves when
// mac_valid and mac_ready are both high; mac_sof marks the first byte,
// mac_eof the last. FIFO words are prefetched one ahead, so the stream has no
// gaps while the FIFO holds data. pkt_done pulses at the end of each packet,
// with pkt_padded high if it carried padding.
//
// Follows the original design: a fixed header built in at compile time,
// waiting for a full packet of data in the FIFO, the zero-padded flush at the
// end of each pulse, the pulse number in every packet, 502-byte payloads and
// the addresses and ports seen on the wire. Own choices: the valid/ready byte
// interface to the MAC, the byte order of the samples and the position of the
// pulse number at the start of the payload.
module udp_tx #(
  parameter int unsigned  PAYLOAD_WORDS = 125,
  parameter int unsigned  FIFO_AW  = 13,
  parameter logic [47:0]  SRC_MAC  = 48'h00_37_ff_ff_37_37,
  parameter logic [47:0]  DST_MAC  = 48'h00_a0_d1_ad_03_bb,
  parameter logic [31:0]  SRC_IP   = {8'd192, 8'd168, 8'd0, 8'd1},
  parameter logic [31:0]  DST_IP   = {8'd192, 8'd168, 8'd0, 8'd3},
  parameter logic [15:0]  SRC_PORT = 16'd2001,
  parameter logic [15:0]  DST_PORT = 16'd2001,
  parameter logic [7:0]   TTL      = 8'd64
) (
  input  logic             clk,
  input  logic             rst,
  // output FIFO, read side
  input  logic [FIFO_AW:0] fifo_count,
  output logic             fifo_rd,
  input  logic [31:0]      fifo_data,
  // flush request and pulse number, both in this clock domain
  input  logic             flush,
  input  logic [15:0]      pulse_no,
  // byte stream to the MAC
  output logic [7:0]       mac_data,
  output logic             mac_valid,
  output logic             mac_sof,
  output logic             mac_eof,
  input  logic             mac_ready,
  output logic             pkt_done,
  output logic             pkt_padded
);
  localparam int unsigned HDR_LEN  = 42;
  localparam int unsigned UDP_PAY  = 2 + 4 * PAYLOAD_WORDS;
  localparam logic [15:0] UDP_LEN  = 16'(8 + UDP_PAY);
  localparam logic [15:0] IP_LEN   = 16'(20 + 8 + UDP_PAY);

  function automatic logic [15:0] ip_checksum();
    logic [31:0] sum;
    sum = 32'h4500 + 32'(IP_LEN) + 32'h0000 + 32'h0000 + {16'd0, TTL, 8'h11}
        + 32'(SRC_IP[31:16]) + 32'(SRC_IP[15:0])
        + 32'(DST_IP[31:16]) + 32'(DST_IP[15:0]);
    sum = {16'd0, sum[15:0]} + {16'd0, sum[31:16]};
    sum = {16'd0, sum[15:0]} + {16'd0, sum[31:16]};
    return ~sum[15:0];
  endfunction

  localparam logic [15:0] IP_CSUM = ip_checksum();

  // The fixed 42-byte header, most significant byte of each field first.
  localparam logic [HDR_LEN*8-1:0] HEADER = {
    DST_MAC, SRC_MAC, 16'h0800,                          // Ethernet II
    8'h45, 8'h00, IP_LEN, 16'h0000, 16'h0000,            // IPv4, no fragments
    TTL, 8'h11, IP_CSUM, SRC_IP, DST_IP,
    SRC_PORT, DST_PORT, UDP_LEN, 16'h0000                // UDP
  };

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PNUM, S_DATA} state_t;
  state_t state;

  logic [$clog2(HDR_LEN)-1:0] pos;
  logic                       pn_byte;
  logic [15:0]                pnum;
  logic [FIFO_AW:0]           words_to_read, fetched, word_idx;
  logic [1:0]                 byte_sel;
  logic [31:0]                pf, sh;
  logic                       pf_valid, rd_pending;
  logic [3:0]                 flush_pending;
  logic                       accept, from_fifo, last_byte;
  logic                       start_full, start_flush, drop_flush;

  assign from_fifo = word_idx < words_to_read;
  assign accept    = mac_valid && mac_ready;
  assign last_byte = (state == S_DATA) && byte_sel == 2'd3 &&
                     word_idx == (FIFO_AW+1)'(PAYLOAD_WORDS - 1);

  assign start_full  = state == S_IDLE && fifo_count >= (FIFO_AW+1)'(PAYLOAD_WORDS);
  assign start_flush = state == S_IDLE && !start_full && flush_pending != 0 && fifo_count != 0;
  assign drop_flush  = state == S_IDLE && !start_full && flush_pending != 0 && fifo_count == 0;

  always_comb begin
    mac_valid = 1'b0;
    mac_data  = 8'h00;
    unique case (state)
      S_IDLE: ;
      S_HDR: begin
        mac_valid = 1'b1;
        mac_data  = HEADER[(HDR_LEN - 1 - int'(pos)) * 8 +: 8];
      end
      S_PNUM: begin
        mac_valid = 1'b1;
        mac_data  = pn_byte ? pnum[7:0] : pnum[15:8];
      end
      S_DATA: begin
        if (byte_sel == 2'd0) begin
          mac_valid = from_fifo ? pf_valid : 1'b1;
          mac_data  = from_fifo ? pf[31:24] : 8'h00;
        end else begin
          mac_valid = 1'b1;
          mac_data  = sh[31:24];
        end
      end
      default: ;
    endcase
  end

  assign mac_sof = state == S_HDR && pos == '0;
  assign mac_eof = last_byte;
  assign fifo_rd = state != S_IDLE && !pf_valid && !rd_pending && fetched < words_to_read;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      pos           <= '0;
      pn_byte       <= 1'b0;
      pnum          <= '0;
      words_to_read <= '0;
      fetched       <= '0;
      word_idx      <= '0;
      byte_sel      <= '0;
      pf            <= '0;
      sh            <= '0;
      pf_valid      <= 1'b0;
      rd_pending    <= 1'b0;
      flush_pending <= '0;
      pkt_done      <= 1'b0;
      pkt_padded    <= 1'b0;
    end else begin
      pkt_done <= 1'b0;

      // FIFO prefetch (one word ahead)
      rd_pending <= fifo_rd;
      if (fifo_rd) fetched <= fetched + 1'b1;
      if (rd_pending) begin
        pf       <= fifo_data;
        pf_valid <= 1'b1;
      end

      // flush requests are counted and served one packet each
      if (flush && !(start_flush || drop_flush)) begin
        if (flush_pending != '1) flush_pending <= flush_pending + 1'b1;
      end else if (!flush && (start_flush || drop_flush)) begin
        flush_pending <= flush_pending - 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          pos      <= '0;
          fetched  <= '0;
          word_idx <= '0;
          byte_sel <= '0;
          if (start_full) begin
            words_to_read <= (FIFO_AW+1)'(PAYLOAD_WORDS);
            pnum          <= pulse_no;
            state         <= S_HDR;
          end else if (start_flush) begin
            words_to_read <= fifo_count;
            pnum          <= pulse_no;
            state         <= S_HDR;
          end
        end
        S_HDR: if (accept) begin
          if (pos == $bits(pos)'(HDR_LEN - 1)) begin
            state   <= S_PNUM;
            pn_byte <= 1'b0;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        S_PNUM: if (accept) begin
          pn_byte <= 1'b1;
          if (pn_byte) state <= S_DATA;
        end
        S_DATA: if (accept) begin
          if (byte_sel == 2'd0) begin
            sh <= from_fifo ? {pf[23:0], 8'h00} : 32'h0;
            if (from_fifo) pf_valid <= 1'b0;
          end else begin
            sh <= {sh[23:0], 8'h00};
          end
          byte_sel <= byte_sel + 1'b1;
          if (byte_sel == 2'd3) begin
            word_idx <= word_idx + 1'b1;
            if (last_byte) begin
              state      <= S_IDLE;
              pkt_done   <= 1'b1;
              pkt_padded <= words_to_read < (FIFO_AW+1)'(PAYLOAD_WORDS);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
