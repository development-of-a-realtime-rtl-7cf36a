// trbnet_hub_logic: central hub logic of one channel.
//
// Connects the input and output buffers of all hub ports for one channel.
//  * Init path: when the channel is free, the lowest-numbered enabled port
//    with an init packet becomes the source of the session. Each of its
//    words is offered to the init outputs of all other enabled ports and
//    consumed once every one of them has taken it (no address routing).
//    The channel is then locked until the session ends.
//  * Reply path: after the init termination has been passed on, every
//    other enabled port owes a reply. Their replies are merged into one
//    stream towards the source port only. Header and data packets are
//    forwarded; each port's termination is absorbed, its error pattern ORed
//    into a merged one. When all ports have terminated, one merged
//    termination (F3 from the first one) is sent and the channel is free.
//  * With REPLY_SWITCH set, the hub may change ports between any two
//    packets when the current port has nothing ready, so a slow link does
//    not hold the others up. Every data packet must then be preceded on the
//    output by its own port's header: the hub stores each port's header and
//    sends it again when it returns to that port. With REPLY_SWITCH clear a
//    port is read until it terminates.
// Ports: per hub port, word ports from the init/reply input buffers and to
// the init/reply output buffers; port_enable masks ports with no link.
// All from the document, except the choice of port (lowest number first)
// and the F3 of the merged termination, which are this design's.
module trbnet_hub_logic
  import trbnet_pkg::*;
#(
  parameter logic [3:0] CHANNEL      = 4'd0,
  parameter int         P            = 4,
  parameter bit         REPLY_SWITCH = 1'b1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [P-1:0] port_enable,
  // init path
  input  word_t        init_in            [P],
  input  logic [P-1:0] init_in_dataready,
  output logic [P-1:0] init_in_read,
  output word_t        init_out           [P],
  output logic [P-1:0] init_out_dataready,
  input  logic [P-1:0] init_out_read,
  // reply path
  input  word_t        reply_in           [P],
  input  logic [P-1:0] reply_in_dataready,
  output logic [P-1:0] reply_in_read,
  output word_t        reply_out          [P],
  output logic [P-1:0] reply_out_dataready,
  input  logic [P-1:0] reply_out_read,
  // status
  output logic         locked,
  output logic [P-1:0] busy_ports,       // ports whose reply is still due
  output logic [15:0]  sessions,
  output logic [15:0]  merged_trms,
  output logic [15:0]  hdr_resends,
  output logic [15:0]  port_switches
);
  localparam int IW = (P > 1) ? $clog2(P) : 1;

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_REPLY, S_TRM} state_e;
  state_e state;

  logic [IW-1:0] src;
  logic [P-1:0]  dests;
  logic [P-1:0]  taken;
  logic [2:0]    init_type;

  // reply merging state
  logic [P-1:0]  pending;
  logic          in_pkt, cur_fwd, r_valid, gen_hdr;
  logic [IW-1:0] cur_port, last_out;
  logic          last_valid;
  logic [1:0]    gen_idx;
  logic [63:0]   hdr_store [P];
  logic [P-1:0]  hdr_seen;
  logic [31:0]   err_or;
  logic [15:0]   f3_first;
  logic          f3_valid;

  assign locked     = (state != S_IDLE);
  assign busy_ports = pending;

  // ------------------------------------------------------- source choice
  logic [P-1:0]  init_req;
  logic [IW-1:0] init_pick;
  always_comb begin
    init_req  = init_in_dataready & port_enable;
    init_pick = '0;
    for (int i = P - 1; i >= 0; i--)
      if (init_req[i] && init_in[i].num == 2'd0) init_pick = IW'(i);
  end
  logic init_any;
  always_comb begin
    init_any = 1'b0;
    for (int i = 0; i < P; i++)
      if (init_req[i] && init_in[i].num == 2'd0) init_any = 1'b1;
  end

  // ------------------------------------------------------- init fan-out
  logic [P-1:0] done_now;
  logic         all_done;
  always_comb begin
    for (int i = 0; i < P; i++) begin
      init_out[i]           = init_in[src];
      init_out_dataready[i] = (state == S_INIT) && dests[i] && !taken[i] &&
                              init_in_dataready[src];
    end
  end
  always_comb begin
    done_now = taken | (init_out_read & init_out_dataready);
    all_done = (state == S_INIT) && init_in_dataready[src] && ((done_now & dests) == dests);
    init_in_read = '0;
    init_in_read[src] = all_done;
  end

  // ---------------------------------------------------- reply choice
  logic [P-1:0]  cand;
  logic [IW-1:0] pick;
  logic          pick_any;
  always_comb begin
    for (int i = 0; i < P; i++)
      cand[i] = pending[i] && reply_in_dataready[i] && reply_in[i].num == 2'd0;
    pick = '0;
    pick_any = 1'b0;
    for (int i = P - 1; i >= 0; i--)
      if (cand[i]) begin pick = IW'(i); pick_any = 1'b1; end
    if (r_valid && (cand[cur_port] || !REPLY_SWITCH)) begin
      pick = cur_port;
      pick_any = cand[cur_port];
    end
  end

  logic          boundary;
  logic [2:0]    pick_type;
  logic          need_hdr;
  assign boundary  = (state == S_REPLY) && !in_pkt && !gen_hdr;
  assign pick_type = reply_in[pick].data[2:0];
  assign need_hdr  = REPLY_SWITCH && pick_type != TYPE_HDR && pick_type != TYPE_TRM &&
                     hdr_seen[pick] && !(last_valid && last_out == pick);

  // ---------------------------------------------------- reply datapath
  logic  out_valid;
  word_t out_word;
  logic  out_take;
  logic [63:0] trm_pkt;
  assign trm_pkt = {word0(CHANNEL, PATH_REPLY, TYPE_TRM), err_or, f3_first};
  always_comb begin
    out_valid = 1'b0;
    out_word  = reply_in[cur_port];
    reply_in_read = '0;
    if (state == S_TRM) begin
      out_word.num  = gen_idx;
      out_word.data = trm_pkt[63 - 16*gen_idx -: 16];
      out_valid     = 1'b1;
    end else if (gen_hdr) begin
      out_word.num  = gen_idx;
      out_word.data = hdr_store[cur_port][63 - 16*gen_idx -: 16];
      out_valid     = 1'b1;
    end else if (state == S_REPLY && in_pkt) begin
      if (cur_fwd) begin
        out_word  = reply_in[cur_port];
        out_valid = reply_in_dataready[cur_port];
        reply_in_read[cur_port] = reply_out_read[src];
      end else begin
        reply_in_read[cur_port] = 1'b1;
      end
    end else if (boundary && pick_any && !need_hdr) begin
      if (pick_type == TYPE_TRM) begin
        reply_in_read[pick] = 1'b1;
      end else begin
        out_word  = reply_in[pick];
        out_valid = 1'b1;
        reply_in_read[pick] = reply_out_read[src];
      end
    end
    for (int i = 0; i < P; i++) begin
      reply_out[i]           = out_word;
      reply_out_dataready[i] = out_valid && (IW'(i) == src);
    end
  end
  assign out_take = out_valid && reply_out_read[src];

  // ------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= S_IDLE;
      src           <= '0;
      dests         <= '0;
      taken         <= '0;
      init_type     <= '0;
      pending       <= '0;
      in_pkt        <= 1'b0;
      cur_fwd       <= 1'b0;
      r_valid       <= 1'b0;
      gen_hdr       <= 1'b0;
      gen_idx       <= '0;
      cur_port      <= '0;
      last_out      <= '0;
      last_valid    <= 1'b0;
      hdr_seen      <= '0;
      err_or        <= '0;
      f3_first      <= '0;
      f3_valid      <= 1'b0;
      sessions      <= '0;
      merged_trms   <= '0;
      hdr_resends   <= '0;
      port_switches <= '0;
      for (int i = 0; i < P; i++) hdr_store[i] <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (init_any) begin
            state <= S_INIT;
            src   <= init_pick;
            dests <= port_enable & ~(P'(1) << init_pick);
            taken <= '0;
          end
        end
        S_INIT: begin
          if (all_done) begin
            taken <= '0;
            if (init_in[src].num == 2'd0) init_type <= init_in[src].data[2:0];
            if (init_in[src].num == 2'd3 && init_type == TYPE_TRM) begin
              state      <= S_REPLY;
              pending    <= dests;
              r_valid    <= 1'b0;
              in_pkt     <= 1'b0;
              gen_hdr    <= 1'b0;
              last_valid <= 1'b0;
              hdr_seen   <= '0;
              err_or     <= '0;
              f3_valid   <= 1'b0;
              sessions   <= sessions + 1'b1;
            end
          end else begin
            taken <= done_now & dests;
          end
        end
        S_REPLY: begin
          if (gen_hdr) begin
            if (out_take) begin
              gen_idx <= gen_idx + 1'b1;
              if (gen_idx == 2'd3) begin
                gen_hdr    <= 1'b0;
                last_out   <= cur_port;
                last_valid <= 1'b1;
              end
            end
          end else if (in_pkt) begin
            if (reply_in_read[cur_port] && reply_in_dataready[cur_port]) begin
              logic [15:0] d;
              d = reply_in[cur_port].data;
              case (reply_in[cur_port].num)
                2'd1: begin
                  if (!cur_fwd) err_or[31:16] <= err_or[31:16] | d;
                  else if (hdr_store[cur_port][50:48] == TYPE_HDR && !hdr_seen[cur_port])
                    hdr_store[cur_port][47:32] <= d;
                end
                2'd2: begin
                  if (!cur_fwd) err_or[15:0] <= err_or[15:0] | d;
                  else if (hdr_store[cur_port][50:48] == TYPE_HDR && !hdr_seen[cur_port])
                    hdr_store[cur_port][31:16] <= d;
                end
                2'd3: begin
                  in_pkt <= 1'b0;
                  if (!cur_fwd) begin
                    if (!f3_valid) begin f3_first <= d; f3_valid <= 1'b1; end
                    pending[cur_port] <= 1'b0;
                    r_valid <= 1'b0;
                  end else if (hdr_store[cur_port][50:48] == TYPE_HDR && !hdr_seen[cur_port]) begin
                    hdr_store[cur_port][15:0] <= d;
                    hdr_seen[cur_port] <= 1'b1;
                  end
                end
                default: ;
              endcase
            end
          end else if (pending == '0) begin
            state   <= S_TRM;
            gen_idx <= '0;
          end else if (pick_any) begin
            if (r_valid && pick != cur_port) port_switches <= port_switches + 1'b1;
            if (!r_valid && last_valid && pick != last_out) port_switches <= port_switches + 1'b1;
            cur_port <= pick;
            r_valid  <= 1'b1;
            if (need_hdr) begin
              gen_hdr     <= 1'b1;
              gen_idx     <= '0;
              hdr_resends <= hdr_resends + 1'b1;
            end else if (pick_type == TYPE_TRM) begin
              in_pkt  <= 1'b1;
              cur_fwd <= 1'b0;
            end else if (out_take) begin
              in_pkt     <= 1'b1;
              cur_fwd    <= 1'b1;
              last_out   <= pick;
              last_valid <= 1'b1;
              if (pick_type == TYPE_HDR) begin
                hdr_store[pick] <= {reply_in[pick].data, 48'h0};
                hdr_seen[pick]  <= 1'b0;
              end
            end
          end
        end
        S_TRM: begin
          if (out_take) begin
            gen_idx <= gen_idx + 1'b1;
            if (gen_idx == 2'd3) begin
              state       <= S_IDLE;
              merged_trms <= merged_trms + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
