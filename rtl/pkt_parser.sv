// pkt_parser: header parser of the router, a state machine over the incoming byte stream.
//
// Each state consumes one header of the SCION/EPIC packet: common header, address
// header (ISD-AS pair), destination and source host addresses (4, 8, 12 or 16 bytes each,
// from the DL/SL fields), the EPIC packet timestamp block (only for path type EPIC), the
// path meta header, the info fields and the hop fields. Info and hop fields are not
// stored one by one: the parser counts through them and keeps only the info field
// selected by CurrINF, the hop field selected by CurrHF and the one before it (when
// CurrHF > 0), which is all the MAC check needs. Everything else, and the payload, is
// skipped.
//
// A packet is rejected (parse_err) when the version is not 0, the path type is neither
// SCION (1) nor EPIC (3), the path meta header is inconsistent (first segment empty, a
// gap between segments, more than 64 hop fields, CurrINF or CurrHF out of range or
// CurrHF outside segment CurrINF), the header length field disagrees with the parsed
// length, or the packet ends inside the header. Error handling beyond that is left to
// the CPU, which receives every rejected packet. The header layouts follow the SCION
// header format; the walk-through-and-keep handling of info and hop fields follows the
// source design; the exact set of checks is this design's own.
//
// Interface: one byte per in_fire, in_last on the final byte of a packet, in_port
// sampled on the first byte. Exactly one phv (phv_valid for one cycle) is produced per
// packet: one cycle after the last header byte for a good packet, one cycle after the
// byte that showed the error (or after the last byte) for a bad one. The parser never
// stalls; the caller throttles it with in_fire.
module pkt_parser
  import scion_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_fire,
  input  logic [7:0]        in_data,
  input  logic              in_last,
  input  logic [PORT_W-1:0] in_port,
  output logic              phv_valid,
  output phv_t              phv
);

  typedef enum logic [3:0] {
    ST_COMMON, ST_ADDR, ST_DHOST, ST_SHOST, ST_EPIC, ST_META, ST_INFO, ST_HOP,
    ST_PAYLOAD, ST_DRAIN
  } state_e;

  state_e           state_q, state_d;
  logic [OFF_W-1:0] cnt_q, cnt_d;     // byte index inside the current header
  logic [OFF_W-1:0] pos_q, pos_d;     // byte index inside the packet
  logic [7:0]       hidx_q, hidx_d;   // hop field index
  logic [3:0]       hb_q, hb_d;       // byte index inside the hop field
  logic [7:0]       hdr_len_q, hdr_len_d;
  logic [1:0]       dl_q, dl_d, sl_q, sl_d;
  logic [127:0]     addr_q, addr_d;
  phv_t             f_q, f_d;         // fields collected so far
  logic             emit;
  logic             err;

  // Lengths of the variable parts.
  logic [OFF_W-1:0] dhost_len, shost_len, info_bytes;
  path_meta_t       meta_new;
  logic [7:0]       seg_lo, seg_hi;

  assign dhost_len  = OFF_W'(4 * (int'(dl_q) + 1));
  assign shost_len  = OFF_W'(4 * (int'(sl_q) + 1));
  assign info_bytes = OFF_W'(INFO_LEN) * OFF_W'(num_inf(f_q.meta));
  assign meta_new   = path_meta_t'({f_q.meta[23:0], in_data});
  assign seg_lo     = (meta_new.curr_inf == 2'd0) ? 8'd0 : seg_end(meta_new, meta_new.curr_inf - 2'd1);
  assign seg_hi     = seg_end(meta_new, meta_new.curr_inf);

  always_comb begin
    state_d   = state_q;
    cnt_d     = cnt_q + 1'b1;
    pos_d     = pos_q + 1'b1;
    hidx_d    = hidx_q;
    hb_d      = hb_q;
    hdr_len_d = hdr_len_q;
    dl_d      = dl_q;
    sl_d      = sl_q;
    addr_d    = addr_q;
    f_d       = f_q;
    emit      = 1'b0;
    err       = 1'b0;

    if (in_fire) begin
      unique case (state_q)
        ST_COMMON: begin
          if (cnt_q == 0) begin
            f_d         = '0;
            f_d.in_port = in_port;
            pos_d       = OFF_W'(1);
            if (in_data[7:4] != 4'd0) err = 1'b1;   // version
          end
          if (cnt_q == 5) hdr_len_d = in_data;
          if (cnt_q == 8) begin
            if (in_data == PT_EPIC)       f_d.epic = 1'b1;
            else if (in_data != PT_SCION) err = 1'b1;
          end
          if (cnt_q == 9) begin
            dl_d = in_data[5:4];
            sl_d = in_data[1:0];
          end
          if (cnt_q == OFF_W'(COMMON_LEN - 1)) begin
            state_d = ST_ADDR;
            cnt_d   = '0;
          end
        end
        ST_ADDR: begin
          addr_d = {addr_q[119:0], in_data};
          if (cnt_q == OFF_W'(ADDR_LEN - 1)) begin
            f_d.dst_isd = addr_d[127:112];
            f_d.dst_as  = addr_d[111:64];
            f_d.src_isd = addr_d[63:48];
            f_d.src_as  = addr_d[47:0];
            state_d     = ST_DHOST;
            cnt_d       = '0;
          end
        end
        ST_DHOST: begin
          if (cnt_q < 4) f_d.dst_host = {f_q.dst_host[23:0], in_data};
          if (cnt_q == dhost_len - 1'b1) begin
            state_d = ST_SHOST;
            cnt_d   = '0;
          end
        end
        ST_SHOST: begin
          if (cnt_q < 4) f_d.src_host = {f_q.src_host[23:0], in_data};
          if (cnt_q == shost_len - 1'b1) begin
            state_d = f_q.epic ? ST_EPIC : ST_META;
            cnt_d   = '0;
          end
        end
        ST_EPIC: begin
          if (cnt_q < 4)      f_d.ts_rel = {f_q.ts_rel[23:0], in_data};
          else if (cnt_q < 8) f_d.pck_id = {f_q.pck_id[23:0], in_data};
          if (cnt_q == OFF_W'(EPIC_LEN - 1)) begin
            state_d = ST_META;
            cnt_d   = '0;
          end
        end
        ST_META: begin
          if (cnt_q == 0) f_d.meta_off = pos_q;
          f_d.meta = meta_new;
          if (cnt_q == OFF_W'(META_LEN - 1)) begin
            if (meta_new.seg0_len == 0
                || (meta_new.seg1_len == 0 && meta_new.seg2_len != 0)
                || meta_new.curr_inf >= num_inf(meta_new)
                || num_hf(meta_new) > 8'(MAX_HF)
                || 8'(meta_new.curr_hf) < seg_lo
                || 8'(meta_new.curr_hf) >= seg_hi)
              err = 1'b1;
            f_d.has_prev = (meta_new.curr_hf != 0);
            state_d      = ST_INFO;
            cnt_d        = '0;
          end
        end
        ST_INFO: begin
          if (cnt_q[OFF_W-1:3] == (OFF_W-3)'(f_q.meta.curr_inf))
            f_d.inf = {f_q.inf[55:0], in_data};
          if (cnt_q == info_bytes - 1'b1) begin
            state_d = ST_HOP;
            cnt_d   = '0;
            hidx_d  = '0;
            hb_d    = '0;
          end
        end
        ST_HOP: begin
          if (hidx_q == 8'(f_q.meta.curr_hf))
            f_d.hf = {f_q.hf[87:0], in_data};
          if (hidx_q + 8'd1 == 8'(f_q.meta.curr_hf))
            f_d.prev_hf = {f_q.prev_hf[87:0], in_data};
          hb_d = hb_q + 1'b1;
          if (hb_q == 4'(HOP_LEN - 1)) begin
            hb_d   = '0;
            hidx_d = hidx_q + 1'b1;
            if (hidx_q + 8'd1 == num_hf(f_q.meta)) begin
              // whole header seen: its length must match HdrLen (4-byte units)
              if (pos_q + 1'b1 != OFF_W'({hdr_len_q, 2'b00})) err = 1'b1;
              emit    = 1'b1;
              state_d = ST_PAYLOAD;
            end
          end
        end
        ST_PAYLOAD, ST_DRAIN: ;
        default: state_d = ST_DRAIN;
      endcase

      if (err && state_q != ST_PAYLOAD && state_q != ST_DRAIN) begin
        emit    = 1'b1;
        state_d = ST_DRAIN;
      end
      if (in_last) begin
        // a packet that ends inside its header is malformed
        if (state_q != ST_PAYLOAD && state_q != ST_DRAIN && !emit) begin
          err  = 1'b1;
          emit = 1'b1;
        end
        state_d = ST_COMMON;
        cnt_d   = '0;
      end
    end else begin
      cnt_d = cnt_q;
      pos_d = pos_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_COMMON;
      cnt_q     <= '0;
      pos_q     <= '0;
      hidx_q    <= '0;
      hb_q      <= '0;
      hdr_len_q <= '0;
      dl_q      <= '0;
      sl_q      <= '0;
      addr_q    <= '0;
      f_q       <= '0;
      phv_valid <= 1'b0;
      phv       <= '0;
    end else begin
      state_q   <= state_d;
      cnt_q     <= cnt_d;
      pos_q     <= pos_d;
      hidx_q    <= hidx_d;
      hb_q      <= hb_d;
      hdr_len_q <= hdr_len_d;
      dl_q      <= dl_d;
      sl_q      <= sl_d;
      addr_q    <= addr_d;
      f_q       <= f_d;
      phv_valid <= emit;
      if (emit) begin
        phv           <= f_d;
        phv.parse_err <= err;
      end
    end
  end

endmodule
