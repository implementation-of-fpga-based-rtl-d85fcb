// ddr2_sdram_model: behavioural model of one x16 DDR2 SDRAM device, for
// simulation only (not synthesizable).
//
// Decodes the command pins at every rising CK edge (CKE, CS#, RAS#, CAS#,
// WE#, BA, A) and keeps per-bank state: open row, time of activation and the
// earliest cycle a new ACTIVATE is legal after a precharge. Write bursts are
// taken from DQ at both edges of DQS starting WL = CL-1 cycles after the
// WRITE; bytes whose DM bit is high are not written. Read bursts are driven
// on DQ from the rising CK edge CL cycles after the READ, one beat per CK
// edge. Bursts are 4 beats long, sequential, wrapping inside the aligned
// group of four columns. Storage is sparse (associative array).
// Protocol checks, each counted in `errors`: command while CKE is low,
// ACTIVATE to an open bank or before tRP / tRFC, READ/WRITE to a closed bank
// or before tRCD, PRECHARGE before tRAS or before write recovery, REFRESH
// with a bank open, any command within tMRD of LOAD MODE, missing DQS/DQ
// drive during a write burst, and mode register contents that do not match
// CL and BL = 4. Pins are ignored until CKE has been seen low at a CK edge
// (the device's power-up condition). It also counts each kind of command for the testbenches.
module ddr2_sdram_model
  import ddr2_pkg::*;
#(
  parameter int unsigned CL    = 3,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RAS = 5,
  parameter int unsigned T_RFC = 14,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned T_MRD = 2
) (
  input  logic              ck,
  input  logic              cke,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BA_W-1:0]   ba,
  input  logic [ADDR_W-1:0] a,
  input  logic [DQ_W-1:0]   dq_in,    // DQ as seen on the board
  input  logic              dq_in_oe, // controller drives DQ
  input  logic              dqs_in,
  input  logic              dqs_in_oe,
  input  logic [DM_W-1:0]   dm,
  input  logic              odt,
  output logic [DQ_W-1:0]   dq_out,
  output logic              dq_out_oe,
  output int                errors
);

  localparam int WL = int'(CL) - 1;
  // signed copies of the timing parameters for cycle arithmetic
  localparam longint LRCD = longint'(T_RCD), LRP = longint'(T_RP), LRAS = longint'(T_RAS);
  localparam longint LRFC = longint'(T_RFC), LWR = longint'(T_WR), LMRD = longint'(T_MRD);
  localparam longint LCL = longint'(CL), LWL = longint'(WL);

  logic [DQ_W-1:0] mem [logic [BA_W+ADDR_W+COL_W-1:0]];

  longint cyc = 0;
  logic   cke_prev = 1'b0;
  logic   powered = 1'b0;  // CKE seen low at a CK edge: power-up has begun
  logic   in_sref = 1'b0, in_pdn = 1'b0;

  logic              open_q   [8];
  logic [ADDR_W-1:0] row_q    [8];
  longint            act_at   [8];
  longint            act_ok   [8];   // earliest cycle for ACTIVATE
  longint            pre_ok   [8];   // earliest cycle for PRECHARGE (write recovery)
  longint            last_ref = -1000, last_mrs = -1000;
  logic [ADDR_W-1:0] mr = '0, emr1 = '0;

  // counters
  int n_act = 0, n_wr = 0, n_wra = 0, n_rd = 0, n_rda = 0, n_pre = 0, n_prea = 0;
  int n_ref = 0, n_mrs = 0, n_emrs = 0, n_sre = 0, n_srx = 0, n_pde = 0, n_pdx = 0;
  int n_ocd_default = 0, n_dll_reset = 0, n_beats_written = 0, n_bytes_masked = 0;
  int n_beats_read = 0, n_odt_writes = 0;

  // pending bursts
  typedef struct { longint due; logic [BA_W-1:0] b; logic [ADDR_W-1:0] r; logic [COL_W-1:0] c; } burst_s;
  burst_s wq[$];
  burst_s rq[$];
  burst_s wcur, rcur;
  logic   wact = 1'b0, ract = 1'b0;

  initial begin
    errors = 0;
    dq_out = '0;
    dq_out_oe = 1'b0;
    for (int i = 0; i < 8; i++) begin
      open_q[i] = 1'b0; row_q[i] = '0; act_at[i] = -1000; act_ok[i] = 0; pre_ok[i] = 0;
    end
  end

  function automatic logic [BA_W+ADDR_W+COL_W-1:0] key(burst_s s, int beat);
    logic [COL_W-1:0] c;
    c = {s.c[COL_W-1:2], 2'(s.c[1:0] + 2'(beat))};
    return {s.b, s.r, c};
  endfunction

  task automatic err(string what);
    errors++;
    $display("[ddr2 model] cycle %0d: %s", cyc, what);
  endtask

  function automatic logic [COL_W-1:0] col_of(logic [ADDR_W-1:0] ad);
    logic [COL_W-1:0] c;
    for (int i = 0; i < COL_W; i++) c[i] = (i < 10) ? ad[i] : ad[i+1];
    return c;
  endfunction

  // ---------------- command decode ----------------
  always @(posedge ck or negedge ck) begin
    if (!ck) begin
      if (ract) begin
        dq_out <= mem.exists(key(rcur, int'(2 * (cyc - rcur.due) + 1))) ?
                  mem[key(rcur, int'(2 * (cyc - rcur.due) + 1))] : '0;
        n_beats_read++;
      end
    end else if (!powered) begin
      powered = !cke;
    end else begin
      cyc++;
      // CKE transitions
      if (cke_prev && !cke) begin
        if (!cs_n && !ras_n && !cas_n && we_n) begin
          in_sref = 1'b1; n_sre++;
          for (int i = 0; i < 8; i++) if (open_q[i]) err("self refresh with a bank open");
        end else begin
          in_pdn = 1'b1; n_pde++;
        end
      end else if (!cke_prev && cke) begin
        if (in_sref) n_srx++;
        else if (in_pdn) n_pdx++;
        in_sref = 1'b0; in_pdn = 1'b0;
      end else if (cke_prev && cke && !cs_n) begin
        int b;
        b = int'(ba);
        if (cyc < last_mrs + LMRD && !(ras_n && cas_n && we_n)) err("command within tMRD of LOAD MODE");
        unique case ({ras_n, cas_n, we_n})
          3'b000: begin  // LOAD MODE
            for (int i = 0; i < 8; i++) if (open_q[i]) err("LOAD MODE with a bank open");
            last_mrs = cyc;
            if (ba == 0) begin
              mr = a; n_mrs++;
              if (a[8]) n_dll_reset++;
              if (a[2:0] != 3'b010) err("mode register burst length is not 4");
              if (int'(a[6:4]) != CL) err("mode register CAS latency mismatch");
            end else begin
              n_emrs++;
              if (ba == 1) begin
                emr1 = a;
                if (a[9:7] == 3'b111) n_ocd_default++;
              end
            end
          end
          3'b001: begin  // REFRESH
            for (int i = 0; i < 8; i++) if (open_q[i]) err("REFRESH with a bank open");
            for (int i = 0; i < 8; i++) if (cyc < act_ok[i]) err("REFRESH before tRP");
            if (cyc < last_ref + LRFC) err("REFRESH within tRFC");
            last_ref = cyc; n_ref++;
          end
          3'b010: begin  // PRECHARGE
            if (a[10]) begin
              n_prea++;
              for (int i = 0; i < 8; i++) if (open_q[i]) begin
                if (cyc < act_at[i] + LRAS) err("PRECHARGE ALL before tRAS");
                if (cyc < pre_ok[i]) err("PRECHARGE ALL before write recovery");
                open_q[i] = 1'b0; act_ok[i] = cyc + LRP;
              end
            end else begin
              n_pre++;
              if (open_q[b]) begin
                if (cyc < act_at[b] + LRAS) err("PRECHARGE before tRAS");
                if (cyc < pre_ok[b]) err("PRECHARGE before write recovery");
                open_q[b] = 1'b0; act_ok[b] = cyc + LRP;
              end
            end
          end
          3'b011: begin  // ACTIVATE
            n_act++;
            if (open_q[b]) err("ACTIVATE to an open bank");
            if (cyc < act_ok[b]) err("ACTIVATE before tRP");
            if (cyc < last_ref + LRFC) err("ACTIVATE within tRFC");
            open_q[b] = 1'b1; row_q[b] = a; act_at[b] = cyc;
          end
          3'b100, 3'b101: begin  // WRITE / READ
            burst_s s;
            logic is_wr;
            is_wr = !we_n;
            if (!open_q[b]) err("READ/WRITE to a closed bank");
            if (cyc < act_at[b] + LRCD) err("READ/WRITE before tRCD");
            s.b = ba; s.r = row_q[b]; s.c = col_of(a);
            if (is_wr) begin
              s.due = cyc + LWL;
              wq.push_back(s);
              if (a[10]) n_wra++; else n_wr++;
              pre_ok[b] = cyc + LWL + 2 + LWR;
              if (a[10]) begin
                longint pc;
                pc = cyc + LWL + 2 + LWR;
                if (pc < act_at[b] + LRAS) pc = act_at[b] + LRAS;
                open_q[b] = 1'b0; act_ok[b] = pc + LRP;
              end
            end else begin
              s.due = cyc + LCL;
              rq.push_back(s);
              if (a[10]) n_rda++; else n_rd++;
              if (a[10]) begin
                longint pc;
                pc = cyc + 2;
                if (pc < act_at[b] + LRAS) pc = act_at[b] + LRAS;
                open_q[b] = 1'b0; act_ok[b] = pc + LRP;
              end
            end
          end
          default: ;  // NOP
        endcase
      end else if (!cke_prev && !cke && !cs_n && !(ras_n && cas_n && we_n)) begin
        err("command while CKE is low");
      end
      cke_prev = cke;

      // read data, beat 0 and 2 at rising edges
      if (ract && cyc == rcur.due + 2) begin
        ract = 1'b0;
        dq_out_oe <= 1'b0;
      end
      if (!ract && rq.size() != 0 && rq[0].due == cyc) begin
        rcur = rq.pop_front();
        ract = 1'b1;
      end
      if (ract) begin
        if (dq_in_oe) err("DQ driven by both sides");
        dq_out    <= mem.exists(key(rcur, int'(2 * (cyc - rcur.due)))) ?
                     mem[key(rcur, int'(2 * (cyc - rcur.due)))] : '0;
        dq_out_oe <= 1'b1;
        n_beats_read++;
      end
      // write burst bookkeeping
      if (wact && cyc == wcur.due + 2) wact = 1'b0;
      if (!wact && wq.size() != 0 && wq[0].due == cyc) begin
        wcur = wq.pop_front();
        wact = 1'b1;
        if (odt) n_odt_writes++;
      end
    end
  end

  // ---------------- write capture on DQS ----------------
  task automatic take_beat(int beat);
    logic [BA_W+ADDR_W+COL_W-1:0] k;
    logic [DQ_W-1:0] old;
    if (!dqs_in_oe || !dq_in_oe) err("write beat without DQS/DQ drive");
    k = key(wcur, beat);
    old = mem.exists(k) ? mem[k] : '0;
    for (int by = 0; by < DM_W; by++) begin
      if (dm[by]) n_bytes_masked++;
      else        old[8*by +: 8] = dq_in[8*by +: 8];
    end
    mem[k] = old;
    n_beats_written++;
  endtask

  always @(posedge dqs_in) if (wact && dqs_in_oe) take_beat(int'(2 * (cyc - wcur.due)));
  always @(negedge dqs_in) if (wact && dqs_in_oe) take_beat(int'(2 * (cyc - wcur.due) + 1));

  // backdoor read for testbenches
  function automatic logic [DQ_W-1:0] peek(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [COL_W-1:0] c);
    logic [BA_W+ADDR_W+COL_W-1:0] k;
    k = {b, r, c};
    return mem.exists(k) ? mem[k] : '0;
  endfunction

endmodule
