// Processing element (PE): maps one short read at a time with the BWA
// inexact backward search (InexRecur) over the BWT occurrence arrays.
//
// How it works. An idle PE requests a read from the short-read buffer and
// latches it together with the C(.) register values and the last suffix-array
// row of the reference. It then runs in two phases on one shared datapath: a
// 32-bit ADD/SUB unit (pe_addsub), k and l registers, and one 32-bit
// comparator behind two operand multiplexers (pe_comparator).
//
//  1. D phase. D(i), the lower bound on the differences in W[0..i], is found
//     by forward exact search over O' (occurrence array of the reversed
//     reference): extend the interval by W[i]; if it becomes empty, count one
//     difference and restart from the full interval. D(i) < 0 is taken as 0.
//  2. Search phase. The initial call (i=len-1, z=zmax, k=0, l=last_row) is
//     pushed on the register-file stack (pe_regfile). Calls are popped one at
//     a time: if z < D(i) the call is dropped; if i < 0 the interval [k,l]
//     with the z still left is sent to the output buffer; otherwise the rows
//     k-1 and l of O are read from memory and, for each base b,
//         k_b = C(b) + O(b,k-1) + 1      l_b = C(b) + O(b,l)
//     and if k_b <= l_b the calls (i-1, z or z-1, k_b, l_b) (match or
//     mismatch) and (i, z-1, k_b, l_b) (deletion) are pushed. Finally the
//     insertion call (i-1, z-1, k, l) is pushed.
//  When the stack is empty an end-of-read record (with the stack-overflow
//  flag) is sent and the PE becomes idle again.
//
// The bases are visited starting at b = W[i] and the insertion call is pushed
// last, so calls that spend a difference are explored before the one that
// keeps z. The result set is the same in any order (the published architecture allows depth
// first, breadth first or a mix); this order keeps the stack shallow. A row
// index of -1 (k = 0) reads as all-zero counts without a memory access.
//
// Interfaces (all valid/ready style, one request in flight):
//   rd_req / rd_valid / rd_data   : read fetch; rd_valid pulses with the read
//   mem_req_* / mem_resp_*        : occurrence-row read; the response is
//                                   always accepted
//   res_valid / res_ready / res_data : result records
// Timing: per expanded call 1 pop + 2 compare + 1 subtract cycles, two memory
// reads (request accept + memory latency each), 3 cycles per base plus one per
// pushed call, and one cycle for the insertion push. A pruned or reported
// call costs 3 cycles (plus the output handshake).
//
// What follows the published architecture: its search algorithm, Eqs. (1),(2)
// of the backward step, and the datapath of its
// PE figure (C register, ADD/SUB, k, l, register file, muxed comparator).
// This design's own choices: the state sequence, the visit order, the record
// formats, D(i) from the published BWA procedure, and control-path counters
// for i-1, z-1 and the base loop.
module pe
  import bwa_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 80
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration from the host (sampled when a read is taken)
  input  logic [3:0][DW-1:0]   cfg_c,         // C(A..T)
  input  logic [DW-1:0]        cfg_last_row,  // |X| - 1, last suffix-array row
  // short-read fetch
  output logic                 rd_req,
  input  logic                 rd_valid,
  input  read_t                rd_data,
  // occurrence-array read
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic [DW-1:0]        mem_req_row,
  output table_t               mem_req_tbl,
  input  logic                 mem_resp_valid,
  input  occ_row_t             mem_resp_data,
  // results
  output logic                 res_valid,
  input  logic                 res_ready,
  output result_t              res_data,
  // status
  output logic                 busy
);

  typedef enum logic [4:0] {
    S_IDLE, S_KM1, S_RDK, S_WK, S_RDL, S_WL, S_ADDK, S_ADDL, S_CMP,
    S_DUPD, S_INIT, S_POP, S_CHKD, S_CHKI, S_EMIT, S_PUSH_MS, S_PUSH_DEL,
    S_NEXTB, S_PUSH_INS, S_END
  } state_t;

  state_t              state;
  logic                dphase;          // 1: computing D(i)
  logic [31:0]         rd_id;
  logic [LEN_W-1:0]    rd_len;
  logic [ZW-1:0]       rd_zmax;
  base_t               w [MAX_READ_LEN];
  logic [ZW-1:0]       dtab [MAX_READ_LEN];
  logic [3:0][DW-1:0]  creg;            // C(.) register
  logic [DW-1:0]       last_row;

  call_t               cur;             // current call; k,l also used in D phase
  logic [DW-1:0]       km1;
  occ_row_t            olo, ohi;        // O(.,k-1) and O(.,l)
  logic [DW-1:0]       kb, lb;
  logic [1:0]          bcnt;
  logic [LEN_W-1:0]    di;              // D phase position
  logic [ZW-1:0]       dz;              // D phase difference count
  logic                cmp_q;           // registered comparator result

  base_t               b_cur;           // base being processed
  base_t               w_i;             // W[i] of the current call
  logic [DW-1:0]       d_of_i;

  // ---------------------------------------------------------------- datapath
  logic [DW-1:0] add_a, add_b, add_y;
  logic          add_sub, add_cin;
  cmp_op_t       cmp_op;
  logic          cmp_res;
  logic [DW-1:0] cmp_k, cmp_l;

  always_comb begin
    w_i    = w[cur.i[$clog2(MAX_READ_LEN)-1:0]];
    b_cur  = dphase ? w[di[$clog2(MAX_READ_LEN)-1:0]] : base_t'(w_i + bcnt);
    d_of_i = cur.i[DW-1] ? '0 : DW'(dtab[cur.i[$clog2(MAX_READ_LEN)-1:0]]);
  end

  always_comb begin
    add_sub = 1'b0;
    add_cin = 1'b0;
    add_a   = creg[b_cur];
    add_b   = ohi[b_cur];
    unique case (state)
      S_KM1:  begin add_a = cur.k; add_b = DW'(1); add_sub = 1'b1; end
      S_ADDK: begin add_b = olo[b_cur]; add_cin = 1'b1; end
      default: ;
    endcase
  end

  pe_addsub #(.W(DW)) u_addsub (
    .a(add_a), .b(add_b), .sub(add_sub), .cin(add_cin), .y(add_y)
  );

  always_comb begin
    unique case (state)
      S_CHKD:  cmp_op = CMP_Z_LT_D;
      S_CHKI:  cmp_op = CMP_I_LT_0;
      default: cmp_op = CMP_K_LE_L;
    endcase
    cmp_k = kb;
    cmp_l = lb;
  end

  pe_comparator #(.W(DW)) u_cmp (
    .op(cmp_op), .z(cur.z), .i(cur.i), .k(cmp_k), .d(d_of_i), .l(cmp_l),
    .res(cmp_res)
  );

  // ------------------------------------------------------------ register file
  logic  rf_push, rf_pop, rf_clear, rf_empty, rf_ovf;
  call_t rf_din, rf_top;

  pe_regfile #(.DEPTH(RF_DEPTH)) u_rf (
    .clk, .rst_n, .clear(rf_clear), .push(rf_push), .push_data(rf_din),
    .pop(rf_pop), .top(rf_top), .empty(rf_empty), .full(),
    .count(), .overflow(rf_ovf)
  );

  logic [DW-1:0] zm1, im1;
  assign zm1 = cur.z - 1'b1;
  assign im1 = cur.i - 1'b1;

  always_comb begin
    rf_push  = 1'b0;
    rf_pop   = (state == S_POP) && !rf_empty;
    rf_clear = (state == S_IDLE);
    rf_din   = '{i: im1, z: zm1, k: cur.k, l: cur.l};
    unique case (state)
      S_INIT:     begin
        rf_push = 1'b1;
        rf_din  = '{i: DW'(rd_len) - 1'b1, z: DW'(rd_zmax), k: '0, l: last_row};
      end
      S_PUSH_MS:  begin
        rf_push = 1'b1;
        rf_din  = '{i: im1, z: (b_cur == w_i) ? cur.z : zm1, k: kb, l: lb};
      end
      S_PUSH_DEL: begin
        rf_push = 1'b1;
        rf_din  = '{i: cur.i, z: zm1, k: kb, l: lb};
      end
      S_PUSH_INS: rf_push = 1'b1;
      default: ;
    endcase
  end

  // -------------------------------------------------------------- interfaces
  assign rd_req        = (state == S_IDLE);
  assign mem_req_valid = ((state == S_RDK) && !km1[DW-1]) || (state == S_RDL);
  assign mem_req_row   = (state == S_RDK) ? km1 : cur.l;
  assign mem_req_tbl   = dphase ? TBL_OREV : TBL_O;
  assign res_valid     = (state == S_EMIT) || (state == S_END);
  assign busy          = (state != S_IDLE);

  always_comb begin
    res_data          = '0;
    res_data.id       = rd_id;
    if (state == S_END) begin
      res_data.kind     = RES_END;
      res_data.overflow = rf_ovf;
    end else begin
      res_data.kind = RES_HIT;
      res_data.k    = cur.k;
      res_data.l    = cur.l;
      res_data.z    = cur.z[ZW-1:0];
    end
  end

  // --------------------------------------------------------------- controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dphase   <= 1'b0;
      rd_id    <= '0;
      rd_len   <= '0;
      rd_zmax  <= '0;
      creg     <= '0;
      last_row <= '0;
      cur      <= '0;
      km1      <= '0;
      olo      <= '0;
      ohi      <= '0;
      kb       <= '0;
      lb       <= '0;
      bcnt     <= '0;
      di       <= '0;
      dz       <= '0;
      cmp_q    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (rd_valid) begin
          rd_id    <= rd_data.id;
          rd_len   <= rd_data.len;
          rd_zmax  <= rd_data.zmax;
          creg     <= cfg_c;
          last_row <= cfg_last_row;
          cur.k    <= '0;
          cur.l    <= cfg_last_row;
          di       <= '0;
          dz       <= '0;
          dphase   <= (rd_data.len != '0);
          state    <= (rd_data.len != '0) ? S_KM1 : S_INIT;
        end
        S_KM1: begin
          km1   <= add_y;
          state <= S_RDK;
        end
        S_RDK: begin
          if (km1[DW-1]) begin          // row -1: O(b,-1) = 0
            olo   <= '0;
            state <= S_RDL;
          end else if (mem_req_ready) begin
            state <= S_WK;
          end
        end
        S_WK: if (mem_resp_valid) begin
          olo   <= mem_resp_data;
          state <= S_RDL;
        end
        S_RDL: if (mem_req_ready) state <= S_WL;
        S_WL: if (mem_resp_valid) begin
          ohi   <= mem_resp_data;
          bcnt  <= '0;
          state <= S_ADDK;
        end
        S_ADDK: begin
          kb    <= add_y;
          state <= S_ADDL;
        end
        S_ADDL: begin
          lb    <= add_y;
          state <= S_CMP;
        end
        S_CMP: begin
          cmp_q <= cmp_res;
          if (dphase)       state <= S_DUPD;
          else if (cmp_res) state <= S_PUSH_MS;
          else              state <= S_NEXTB;
        end
        S_DUPD: begin
          if (cmp_q) begin
            cur.k <= kb;
            cur.l <= lb;
            dtab[di[$clog2(MAX_READ_LEN)-1:0]] <= dz;
          end else begin
            cur.k <= '0;
            cur.l <= last_row;
            dz    <= dz + 1'b1;
            dtab[di[$clog2(MAX_READ_LEN)-1:0]] <= dz + 1'b1;
          end
          if (di == rd_len - 1'b1) begin
            dphase <= 1'b0;
            state  <= S_INIT;
          end else begin
            di    <= di + 1'b1;
            state <= S_KM1;
          end
        end
        S_INIT: state <= S_POP;
        S_POP: begin
          if (rf_empty) begin
            state <= S_END;
          end else begin
            cur   <= rf_top;
            state <= S_CHKD;
          end
        end
        S_CHKD: state <= cmp_res ? S_POP : S_CHKI;
        S_CHKI: state <= cmp_res ? S_EMIT : S_KM1;
        S_EMIT: if (res_ready) state <= S_POP;
        S_PUSH_MS:  state <= S_PUSH_DEL;
        S_PUSH_DEL: state <= S_NEXTB;
        S_NEXTB: begin
          if (bcnt == 2'd3) begin
            state <= S_PUSH_INS;
          end else begin
            bcnt  <= bcnt + 1'b1;
            state <= S_ADDK;
          end
        end
        S_PUSH_INS: state <= S_POP;
        S_END: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The read bases are only written when a new read is taken.
  always_ff @(posedge clk) begin
    if (state == S_IDLE && rd_valid) begin
      for (int j = 0; j < MAX_READ_LEN; j++) w[j] <= rd_data.bases[j];
    end
  end

  // A memory request is held, unchanged, until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_row));

endmodule
