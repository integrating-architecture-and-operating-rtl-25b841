// processor_interface: the Processor Interface (PI), a sequential engine that
// executes the process communication instructions of all n processors.
//
// Each process (i,j) -- level i of multiprogramming on processor P_j -- has
// an ID register, a signal register S (the ID of the process it wants to
// reach), an interrupt address INT, and two accept flags: PA (a preempt may
// be taken) and CA (a signal may be taken). These live in a four-word
// descriptor in module M_{2n-1}, together with the head (Q.Link) and length
// (Q.Length) of the process's queue of messages that could not be delivered
// yet. Only the PI touches this data, and because the PI executes one
// instruction at a time no further mutual exclusion is needed.
//
// Layout of M_{2n-1} (word addresses, from low to high):
//   Q .. L-1       queue space, QENT two-word message entries
//   L .. L+4mn-1   descriptors; process (i,j) at L + 4(i*n + j)
//   K .. K+n-1     PC saved when P_j is interrupted by a signal
//   J .. J+n-1     PC saved when P_j is interrupted by a preemption
//   I .. I+n-1     mailbox: call word written by P_j to I+j
// The order of the regions, the per-processor save words and the four
// descriptor words with their fields follow the document; region sizes,
// bit positions and the second word of a message entry (the preempt
// address) are this design's.
//
// A processor calls the PI by writing a call word (mp_pkg::pi_call_t) to its
// mailbox over the shared bus; the PI sees the write on snoop_req, serves
// waiting callers round robin, and answers with a one-cycle done pulse to
// the caller carrying a status and a data word (the instruction-complete
// interrupt). Instructions:
//   PREEMPT  to the process whose ID equals the caller's S, when the caller
//            has privilege over it: if it is running and its PA is set, its
//            processor is interrupted (PC saved at J+j', PC := operand,
//            A-register := caller's A), PA is cleared and the caller's PA set;
//            otherwise the message is queued.
//   SIGNAL   as PREEMPT but needs only cooperative communication, needs PA
//            and CA, clears both, saves the PC at K+j' and starts the
//            receiver at its INT address.
//   SCHEDULE the operating system puts level `operand` on the calling
//            processor; the process's ID, S and INT are handed back on
//            sched_id/sched_s/sched_int (valid with done) for the processor
//            to restore, and the PI then delivers the first queued message
//            if the process accepts it.
//   LOAD_ID  ID of (i',j') := operand, only with privilege over (i',j') (or
//            into an empty slot, ID 0), only with bits the caller has, and
//            never equal to another process's ID.
//   LOAD_S, LOAD_INT, SET_ACCEPT change the caller's own registers (a
//            SET_ACCEPT that opens PA/CA also delivers a waiting message).
//   READ_REG returns one word of the caller's descriptor.
//
// Interrupting a processor: int_req[j] stays high with int_kind, int_pc and
// int_areg until the processor, at the end of its current instruction,
// answers int_ack[j] with its old PC on proc_pc[j].
//
// After reset the PI spends about I+n cycles initialising M_{2n-1}: all IDs
// zero except process (0,0), which gets all ones (the supervisor), and all
// queue entries on the free list. `ready` rises when this is done.
module processor_interface
  import mp_pkg::*;
#(
  parameter int unsigned N    = 4,   // processors
  parameter int unsigned M    = 4,   // levels of multiprogramming per processor
  parameter int unsigned H    = 4,   // ID and S register width
  parameter int unsigned QENT = 32,  // message queue entries
  parameter int unsigned AW   = 10   // word address bits of module M_{2n-1}
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,
  // private path to M_{2n-1}
  output mem_req_t         mem_req,
  input  logic [DW-1:0]    mem_rdata,
  // bus-side requests into M_{2n-1}, watched for mailbox writes
  input  mem_req_t         snoop_req,
  // processors' registers read by the PI
  input  logic [ADDRW-1:0] proc_areg [N],
  input  logic [ADDRW-1:0] proc_pc   [N],
  // interrupts forced on receiving processors
  output logic [N-1:0]     int_req,
  output int_kind_e        int_kind,
  output logic [ADDRW-1:0] int_pc,
  output logic [ADDRW-1:0] int_areg,
  input  logic [N-1:0]     int_ack,
  // instruction-complete interrupt to the caller
  output logic [N-1:0]     done,
  output pi_status_e       done_status,
  output logic [DW-1:0]    done_data,
  // registers restored into the calling processor by SCHEDULE
  output logic [H-1:0]     sched_id,
  output logic [H-1:0]     sched_s,
  output logic [ADDRW-1:0] sched_int,
  // event pulses, for observation
  output logic             ev_delivered,
  output logic             ev_queued,
  output logic             ev_dequeued,
  output logic             ev_refused
);
  localparam int unsigned P      = M * N;              // processes
  localparam int unsigned NW     = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned LW     = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned PW     = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned Q_BASE = 0;
  localparam int unsigned L_BASE = Q_BASE + 2 * QENT;
  localparam int unsigned K_BASE = L_BASE + 4 * P;
  localparam int unsigned J_BASE = K_BASE + N;
  localparam int unsigned I_BASE = J_BASE + N;
  localparam int unsigned TOP    = I_BASE + N;         // words used

  if (TOP > 2 ** AW) begin : g_size_check
    $error("processor_interface: tables need %0d words, module has %0d", TOP, 2 ** AW);
  end

  typedef enum logic [5:0] {
    S_INIT, S_IDLE, S_RD, S_RD2, S_CALL,
    S_SND_RD, S_SND_ST, S_DISPATCH,
    S_SCAN_RD, S_SCAN_CHK, S_TGT_RD, S_TGT_ST,
    S_MSG, S_SND_PA,
    S_ENQ1, S_ENQ2, S_ENQ_HEAD, S_WALK, S_WALK2, S_LINK, S_ENQ_LEN,
    S_DEQ, S_DEQ1, S_DEQ2, S_DEQ3, S_DEQ4,
    S_LDID_CHK, S_LDID_WR,
    S_INT, S_FIN
  } st_e;

  st_e              st, ret, tgt_ret, dl_ret;
  logic [AW-1:0]    init_addr;
  logic [N-1:0]     pending;
  logic [NW-1:0]    cj;                    // caller
  pi_call_t         call;
  logic [N-1:0]     running_v;
  logic [LW-1:0]    running_lvl [N];
  logic [PW-1:0]    snd_idx, tgt_idx;
  logic [LW-1:0]    tgt_i, scan_i;
  logic [NW-1:0]    tgt_j, scan_j;
  logic             scan_uniq;             // 0: find receiver, 1: ID uniqueness
  logic [DW-1:0]    snd_w [4];
  logic [DW-1:0]    tgt_w [4];
  logic [1:0]       k;
  logic [DW-1:0]    rdbuf, msg0;
  logic [AW-1:0]    free_head, e, p;
  logic [$clog2(QENT+1)-1:0] free_cnt;
  logic [15:0]      cnt;
  int_kind_e        dl_kind;
  logic [ADDRW-1:0] dl_pc, dl_areg;
  logic [NW-1:0]    dl_j;
  pi_status_e       status;

  // ---------------------------------------------------------------- rights
  logic r_coop, r_priv, r_back, r_legal;
  id_rights #(.H(H)) u_rights (
    .id_a(snd_w[0][H-1:0]), .id_b(tgt_w[0][H-1:0]), .id_new(call.operand[H-1:0]),
    .cooperate(r_coop), .a_priv_b(r_priv), .b_priv_a(r_back), .new_legal(r_legal)
  );

  // ------------------------------------------------------------- callers
  logic [N-1:0]  gnt;
  logic [NW-1:0] gidx;
  logic          any_gnt, take;
  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req(pending), .advance(take),
    .gnt, .gnt_idx(gidx), .any_gnt
  );
  assign take = (st == S_IDLE) && any_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else begin
      for (int unsigned j = 0; j < N; j++) begin
        if (snoop_req.en && snoop_req.we &&
            snoop_req.addr[AW-1:0] == AW'(I_BASE + j))
          pending[j] <= 1'b1;
        else if (take && gnt[j])
          pending[j] <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------- helpers
  function automatic logic [AW-1:0] daddr(input logic [PW-1:0] idx, input int unsigned w);
    return AW'(L_BASE + 4 * int'(idx) + w);
  endfunction

  function automatic logic [PW-1:0] pidx(input logic [LW-1:0] i, input logic [NW-1:0] j);
    return PW'(int'(i) * N + int'(j));
  endfunction

  function automatic logic [DW-1:0] init_word(input logic [AW-1:0] a);
    if (a < AW'(L_BASE))
      return (a[0] == 1'b0) ? {1'b0, 15'(a + AW'(2)), 16'h0} : '0;  // free list
    else if (a == AW'(L_BASE))
      return DW'({H{1'b1}});                                     // ID of (0,0)
    else
      return '0;
  endfunction

  pi_call_t     rd_call;
  assign rd_call = pi_call_t'(rdbuf);
  wire [H-1:0]  snd_s     = snd_w[1][H-1:0];
  wire [H-1:0]  new_id    = call.operand[H-1:0];
  wire [15:0]   tgt_qlen  = tgt_w[2][15:0];
  wire [AW-1:0] tgt_qhead = tgt_w[3][16 +: AW];
  wire          tgt_run   = running_v[tgt_j] && running_lvl[tgt_j] == tgt_i;
  wire          is_pre    = (call.op == OP_PREEMPT);
  wire          scan_last = (scan_j == NW'(N - 1)) && (scan_i == LW'(M - 1));

  // ------------------------------------------------------------ interrupt
  always_comb begin
    int_req = '0;
    if (st == S_INT) int_req[dl_j] = 1'b1;
  end
  assign int_kind = dl_kind;
  assign int_pc   = dl_pc;
  assign int_areg = dl_areg;

  // --------------------------------------------------------------- engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_INIT;
      ret          <= S_IDLE;
      tgt_ret      <= S_IDLE;
      dl_ret       <= S_IDLE;
      init_addr    <= '0;
      ready        <= 1'b0;
      mem_req      <= '0;
      cj           <= '0;
      call         <= '0;
      running_v    <= '0;
      for (int unsigned j = 0; j < N; j++) running_lvl[j] <= '0;
      snd_idx      <= '0;
      tgt_idx      <= '0;
      tgt_i        <= '0;
      tgt_j        <= '0;
      scan_i       <= '0;
      scan_j       <= '0;
      scan_uniq    <= 1'b0;
      for (int unsigned w = 0; w < 4; w++) begin
        snd_w[w] <= '0;
        tgt_w[w] <= '0;
      end
      k            <= '0;
      rdbuf        <= '0;
      msg0         <= '0;
      free_head    <= AW'(Q_BASE);
      free_cnt     <= '0;
      e            <= '0;
      p            <= '0;
      cnt          <= '0;
      dl_kind      <= INT_SIGNAL;
      dl_pc        <= '0;
      dl_areg      <= '0;
      dl_j         <= '0;
      status       <= ST_OK;
      done         <= '0;
      done_status  <= ST_OK;
      done_data    <= '0;
      sched_id     <= '0;
      sched_s      <= '0;
      sched_int    <= '0;
      ev_delivered <= 1'b0;
      ev_queued    <= 1'b0;
      ev_dequeued  <= 1'b0;
      ev_refused   <= 1'b0;
    end else begin
      mem_req.en   <= 1'b0;
      mem_req.we   <= 1'b0;
      done         <= '0;
      ev_delivered <= 1'b0;
      ev_queued    <= 1'b0;
      ev_dequeued  <= 1'b0;
      ev_refused   <= 1'b0;

      unique case (st)
        // ---- initialise M_{2n-1}
        S_INIT: begin
          mem_req   <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(init_addr), wdata: init_word(init_addr)};
          init_addr <= init_addr + 1'b1;
          if (init_addr == AW'(TOP - 1)) begin
            free_head <= AW'(Q_BASE);
            free_cnt  <= QENT[$clog2(QENT+1)-1:0];
            ready     <= 1'b1;
            st        <= S_IDLE;
          end
        end

        // ---- read sub-sequence: address issued, data in rdbuf on return
        S_RD:  st <= S_RD2;
        S_RD2: begin
          rdbuf <= mem_rdata;
          st    <= ret;
        end

        // ---- take the next call
        S_IDLE: if (any_gnt) begin
          cj      <= gidx;
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(I_BASE + int'(gidx)), wdata: '0};
          ret     <= S_CALL;
          st      <= S_RD;
        end

        S_CALL: begin
          call <= pi_call_t'(rdbuf);
          if (rd_call.op == OP_SCHEDULE) begin
            if (rdbuf[15:0] < 16'(M)) begin
              running_v[cj]   <= 1'b1;
              running_lvl[cj] <= rdbuf[LW-1:0];
              tgt_idx         <= pidx(rdbuf[LW-1:0], cj);
              tgt_i           <= rdbuf[LW-1:0];
              tgt_j           <= cj;
              k               <= '0;
              tgt_ret         <= S_DEQ;
              status          <= ST_OK;
              st              <= S_TGT_RD;
            end else begin
              status <= ST_BADCALL;
              st     <= S_FIN;
            end
          end else if (!running_v[cj]) begin
            status <= ST_BADCALL;
            st     <= S_FIN;
          end else begin
            snd_idx <= pidx(running_lvl[cj], cj);
            k       <= '0;
            st      <= S_SND_RD;
          end
        end

        // ---- caller's descriptor
        S_SND_RD: begin
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(daddr(snd_idx, k)), wdata: '0};
          ret     <= S_SND_ST;
          st      <= S_RD;
        end
        S_SND_ST: begin
          snd_w[k] <= rdbuf;
          k        <= k + 1'b1;
          st       <= (k == 2'd3) ? S_DISPATCH : S_SND_RD;
        end

        S_DISPATCH: begin
          status <= ST_OK;
          unique case (call.op)
            OP_PREEMPT, OP_SIGNAL: begin
              if (snd_s == '0) begin
                status <= ST_NOTFOUND;
                st     <= S_FIN;
              end else begin
                scan_i    <= '0;
                scan_j    <= '0;
                scan_uniq <= 1'b0;
                st        <= S_SCAN_RD;
              end
            end
            OP_LOAD_ID: begin
              if (call.tgt_level >= 4'(M) || call.tgt_proc >= 8'(N)) begin
                status <= ST_BADCALL;
                st     <= S_FIN;
              end else begin
                tgt_i   <= call.tgt_level[LW-1:0];
                tgt_j   <= call.tgt_proc[NW-1:0];
                tgt_idx <= pidx(call.tgt_level[LW-1:0], call.tgt_proc[NW-1:0]);
                k       <= '0;
                tgt_ret <= S_LDID_CHK;
                st      <= S_TGT_RD;
              end
            end
            OP_LOAD_S: begin
              mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(snd_idx, 1)),
                           wdata: DW'(call.operand[H-1:0])};
              st      <= S_FIN;
            end
            OP_LOAD_INT: begin
              mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(snd_idx, 3)),
                           wdata: {snd_w[3][31:16], call.operand}};
              st      <= S_FIN;
            end
            OP_SET_ACCEPT: begin
              mem_req  <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(snd_idx, 2)),
                            wdata: {call.operand[1], call.operand[0], snd_w[2][29:0]}};
              tgt_idx  <= snd_idx;
              tgt_i    <= running_lvl[cj];
              tgt_j    <= cj;
              tgt_w[0] <= snd_w[0];
              tgt_w[1] <= snd_w[1];
              tgt_w[2] <= {call.operand[1], call.operand[0], snd_w[2][29:0]};
              tgt_w[3] <= snd_w[3];
              st       <= S_DEQ;
            end
            OP_READ_REG: begin
              done_data <= snd_w[call.operand[1:0]];
              st        <= S_FIN;
            end
            default: begin
              status <= ST_BADCALL;
              st     <= S_FIN;
            end
          endcase
        end

        // ---- search the descriptors by ID
        S_SCAN_RD: begin
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(daddr(pidx(scan_i, scan_j), 0)), wdata: '0};
          ret     <= S_SCAN_CHK;
          st      <= S_RD;
        end
        S_SCAN_CHK: begin
          if (!scan_uniq && rdbuf[H-1:0] == snd_s) begin
            tgt_i   <= scan_i;
            tgt_j   <= scan_j;
            tgt_idx <= pidx(scan_i, scan_j);
            k       <= '0;
            tgt_ret <= S_MSG;
            st      <= S_TGT_RD;
          end else if (scan_uniq && rdbuf[H-1:0] == new_id &&
                       pidx(scan_i, scan_j) != tgt_idx) begin
            status <= ST_DENIED;
            st     <= S_FIN;
          end else if (scan_last) begin
            if (scan_uniq) begin
              st <= S_LDID_WR;
            end else begin
              status <= ST_NOTFOUND;
              st     <= S_FIN;
            end
          end else begin
            if (scan_j == NW'(N - 1)) begin
              scan_j <= '0;
              scan_i <= scan_i + 1'b1;
            end else begin
              scan_j <= scan_j + 1'b1;
            end
            st <= S_SCAN_RD;
          end
        end

        // ---- receiver's descriptor
        S_TGT_RD: begin
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(daddr(tgt_idx, k)), wdata: '0};
          ret     <= S_TGT_ST;
          st      <= S_RD;
        end
        S_TGT_ST: begin
          tgt_w[k] <= rdbuf;
          k        <= k + 1'b1;
          st       <= (k == 2'd3) ? tgt_ret : S_TGT_RD;
        end

        // ---- preempt / signal: rights, then deliver or queue
        S_MSG: begin
          if (is_pre ? !r_priv : !r_coop) begin
            status <= ST_DENIED;
            st     <= S_FIN;
          end else if (tgt_run && tgt_w[2][PA_BIT] && (is_pre || tgt_w[2][CA_BIT])) begin
            logic [DW-1:0] nw2;
            nw2 = tgt_w[2];
            nw2[PA_BIT] = 1'b0;
            if (!is_pre) nw2[CA_BIT] = 1'b0;
            tgt_w[2] <= nw2;
            mem_req  <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 2)), wdata: nw2};
            dl_kind  <= is_pre ? INT_PREEMPT : INT_SIGNAL;
            dl_pc    <= is_pre ? call.operand : tgt_w[3][15:0];
            dl_areg  <= proc_areg[cj];
            dl_j     <= tgt_j;
            dl_ret   <= S_SND_PA;
            status   <= ST_DELIVERED;
            st       <= S_INT;
          end else if (free_cnt == '0) begin
            status <= ST_QFULL;
            st     <= S_FIN;
          end else begin
            e       <= free_head;
            mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(free_head), wdata: '0};
            ret     <= S_ENQ1;
            st      <= S_RD;
          end
        end
        S_SND_PA: begin
          logic [DW-1:0] w2;
          w2 = (snd_idx == tgt_idx) ? tgt_w[2] : snd_w[2];
          w2[PA_BIT] = 1'b1;
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(snd_idx, 2)), wdata: w2};
          st      <= S_FIN;
        end

        // ---- ENQUEUE
        S_ENQ1: begin
          free_head <= rdbuf[16 +: AW];
          free_cnt  <= free_cnt - 1'b1;
          mem_req   <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(e),
                         wdata: {is_pre, 15'h0, proc_areg[cj]}};
          st        <= S_ENQ2;
        end
        S_ENQ2: begin
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(e + 1'b1), wdata: DW'(call.operand)};
          if (tgt_qlen == '0) begin
            st <= S_ENQ_HEAD;
          end else begin
            p   <= tgt_qhead;
            cnt <= tgt_qlen - 1'b1;
            st  <= S_WALK;
          end
        end
        S_ENQ_HEAD: begin
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 3)),
                       wdata: {16'(e), tgt_w[3][15:0]}};
          st      <= S_ENQ_LEN;
        end
        S_WALK: begin
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(p), wdata: '0};
          ret     <= (cnt == '0) ? S_LINK : S_WALK2;
          st      <= S_RD;
        end
        S_WALK2: begin
          p   <= rdbuf[16 +: AW];
          cnt <= cnt - 1'b1;
          st  <= S_WALK;
        end
        S_LINK: begin
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(p),
                       wdata: {rdbuf[31], 15'(e), rdbuf[15:0]}};
          st      <= S_ENQ_LEN;
        end
        S_ENQ_LEN: begin
          mem_req   <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 2)),
                         wdata: {tgt_w[2][31:16], tgt_qlen + 1'b1}};
          status    <= ST_QUEUED;
          ev_queued <= 1'b1;
          st        <= S_FIN;
        end

        // ---- DEQUEUE: first waiting message of a running process
        S_DEQ: begin
          if (tgt_qlen == '0) begin
            st <= S_FIN;
          end else begin
            e       <= tgt_qhead;
            mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(tgt_qhead), wdata: '0};
            ret     <= S_DEQ1;
            st      <= S_RD;
          end
        end
        S_DEQ1: begin
          msg0    <= rdbuf;
          mem_req <= '{en: 1'b1, we: 1'b0, addr: ADDRW'(e + 1'b1), wdata: '0};
          ret     <= S_DEQ2;
          st      <= S_RD;
        end
        S_DEQ2: begin
          if (!tgt_w[2][PA_BIT] || !(msg0[31] || tgt_w[2][CA_BIT])) begin
            st <= S_FIN;                       // not accepted now; stays queued
          end else begin
            logic [DW-1:0] nw2;
            nw2 = {tgt_w[2][31:16], tgt_qlen - 1'b1};
            nw2[PA_BIT] = 1'b0;
            if (!msg0[31]) nw2[CA_BIT] = 1'b0;
            tgt_w[2] <= nw2;
            mem_req  <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 2)), wdata: nw2};
            dl_kind  <= msg0[31] ? INT_PREEMPT : INT_SIGNAL;
            dl_pc    <= msg0[31] ? rdbuf[15:0] : tgt_w[3][15:0];
            dl_areg  <= msg0[15:0];
            dl_j     <= tgt_j;
            dl_ret   <= S_FIN;
            st       <= S_DEQ3;
          end
        end
        S_DEQ3: begin
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 3)),
                       wdata: {1'b0, msg0[30:16], tgt_w[3][15:0]}};
          st      <= S_DEQ4;
        end
        S_DEQ4: begin
          mem_req     <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(e),
                           wdata: {1'b0, 15'(free_head), 16'h0}};
          free_head   <= e;
          free_cnt    <= free_cnt + 1'b1;
          ev_dequeued <= 1'b1;
          status      <= ST_DELIVERED;
          st          <= S_INT;
        end

        // ---- LOAD_ID
        S_LDID_CHK: begin
          if (!r_legal || !(tgt_w[0][H-1:0] == '0 || r_priv)) begin
            status <= ST_DENIED;
            st     <= S_FIN;
          end else if (new_id == '0) begin
            st <= S_LDID_WR;
          end else begin
            scan_i    <= '0;
            scan_j    <= '0;
            scan_uniq <= 1'b1;
            st        <= S_SCAN_RD;
          end
        end
        S_LDID_WR: begin
          mem_req <= '{en: 1'b1, we: 1'b1, addr: ADDRW'(daddr(tgt_idx, 0)), wdata: DW'(new_id)};
          status  <= ST_OK;
          st      <= S_FIN;
        end

        // ---- interrupt the receiving processor and save its PC
        S_INT: if (int_ack[dl_j]) begin
          mem_req      <= '{en: 1'b1, we: 1'b1,
                            addr: ADDRW'((dl_kind == INT_PREEMPT ? J_BASE : K_BASE) + int'(dl_j)),
                            wdata: DW'(proc_pc[dl_j])};
          ev_delivered <= 1'b1;
          st           <= dl_ret;
        end

        // ---- instruction-complete interrupt to the caller
        S_FIN: begin
          done[cj]    <= 1'b1;
          done_status <= status;
          if (call.op != OP_READ_REG) done_data <= '0;
          if (call.op == OP_SCHEDULE && status != ST_BADCALL) begin
            sched_id  <= tgt_w[0][H-1:0];
            sched_s   <= tgt_w[1][H-1:0];
            sched_int <= tgt_w[3][15:0];
          end
          ev_refused  <= (status == ST_DENIED) || (status == ST_NOTFOUND);
          st          <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
