// tb_tpu_controller: self-checking test of the layer scheduler (WPAR = 3, MPAR = 2).
//
// A three-layer network (padded 3x3 convolution with a partial filter group, 2x3 depthwise
// convolution with horizontal padding only and stride 2, fully connected layer with two PE
// groups) is placed in a real weights RAM. The testbench generates its own list of steps
// from the layer shapes (loop order filter group, row, column group, channel, r, s) and
// checks, step by step:
//   - the weights word address (and, a cycle later, the tap slot),
//   - for every PE column whose input pixel lies inside the input tensor, that the bank
//     holding that pixel is given the pixel's word address, and that `rot` routes that bank
//     to the column; columns outside the tensor must be marked as padding,
//   - the input channel lane and the first/last flags, one cycle after the addresses,
//   - that each last step is followed QUANT_STAGES cycles later by a storing-stage tag with
//     the group's row, first column and filter group,
// and finally the total number of steps against the latency formula and the `done` flag.
`timescale 1ns/1ps
module tb_tpu_controller;
  import gemini_pkg::*;
  import gemini_model_pkg::*;

  localparam int WPAR = 3, MPAR = 2, NPE = WPAR * MPAR;
  localparam int FAW = 10, WAW = 10, WEIGHT_BYTES = NPE * (1 << WAW);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic w_re, fm_re;
  logic [WAW-1:0] w_raddr;
  logic [NPE*8-1:0] w_rdata;
  logic [WPAR-1:0][FAW-1:0] fm_raddr;
  mix_mode_e mix_mode;
  logic [1:0] rot, wslot;
  logic [0:0] lane;
  logic [WPAR-1:0] col_valid;
  logic [7:0] pad_value;
  logic pe_en, pe_first, pe_last, relu, st_valid;
  pe_op_e pe_op;
  logic [15:0] scale;
  logic [5:0] shift;
  st_tag_t st_tag;
  dim_t lastcol, oh, owa;
  logic [1:0] slog;
  logic [FAW-1:0] out_base;
  logic host_we = 0;
  logic [WAW-1:0] host_addr = '0;
  logic [NPE*8-1:0] host_wdata = '0;

  always #5 clk = ~clk;

  tpu_controller #(.WPAR(WPAR), .MPAR(MPAR), .FAW(FAW), .WAW(WAW)) dut (
    .clk, .rst_n, .start, .busy, .done, .w_re, .w_raddr, .w_hdr(w_rdata[31:0]),
    .fm_re, .fm_raddr, .mix_mode, .rot, .lane, .col_valid, .pad_value, .wslot,
    .pe_en, .pe_first, .pe_last, .pe_op, .scale, .shift, .relu,
    .st_valid, .st_tag, .lastcol, .slog, .oh, .owa, .out_base);

  weights_ram #(.NPE(NPE), .WEIGHT_BYTES(WEIGHT_BYTES)) u_wram (
    .clk, .re(w_re), .raddr(w_raddr), .rdata(w_rdata),
    .we(host_we), .waddr(host_addr), .wdata(host_wdata));

  typedef struct {
    int waddr, slot, lane;
    bit first, last;
    int bank_addr [WPAR];   // -1: don't care
    int col_bank [WPAR];    // bank that must feed column w, -1: padding
    st_tag_t tag;
  } step_t;

  step_t steps [$];
  int checks = 0, failures = 0;
  gemini_net net;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected steps of a convolution-like layer
  task automatic gen_conv(layer_type_e lt, tensor_t in, int m, int r, int s, bit padv, bit padh,
                          int wbase);
    int rows = padv ? in.h : in.h - r + 1;
    int ptop = padv ? (r - 1) / 2 : 0, pleft = padh ? (s - 1) / 2 : 0;
    int cin = (lt == L_CONV) ? in.c : 1;
    int kc = cin * r * s, kw = (kc + WPAR - 1) / WPAR;
    if (lt != L_CONV) m = in.c;
    for (int mg = 0; mg * MPAR < m; mg++)
      for (int yo = 0; yo < rows; yo++)
        for (int xo0 = 0; xo0 < in.w; xo0 += WPAR)
          for (int c = 0; c < cin; c++)
            for (int rr = 0; rr < r; rr++)
              for (int ss = 0; ss < s; ss++) begin
                step_t st;
                int k = (c * r + rr) * s + ss;
                st.waddr = wbase + mg * kw + k / WPAR;
                st.slot  = k % WPAR;
                st.lane  = (lt == L_CONV) ? c % MPAR : -1;
                st.first = (k == 0);
                st.last  = (k == kc - 1);
                st.tag   = '{yo: dim_t'(yo), xo0: dim_t'(xo0), mg: dim_t'(mg)};
                for (int b = 0; b < WPAR; b++) st.bank_addr[b] = -1;
                for (int w = 0; w < WPAR; w++) begin
                  int yi = yo + rr - ptop, xi = xo0 + w + ss - pleft;
                  int ch = (lt == L_CONV) ? c : mg * MPAR;
                  if (yi >= 0 && yi < in.h && xi >= 0 && xi < in.w) begin
                    st.col_bank[w] = net.fm_bank(in, xi);
                    st.bank_addr[net.fm_bank(in, xi)] = net.fm_addr(in, ch, yi, xi);
                  end else st.col_bank[w] = -1;
                end
                steps.push_back(st);
              end
  endtask

  task automatic gen_fc(tensor_t in, int nout, int wbase);
    int cs [$], ys [$], xs [$];
    for (int cg = 0; cg * MPAR < in.c; cg++)
      for (int y = 0; y < in.h; y++)
        for (int x = 0; x < in.w; x++)
          for (int l = 0; l < MPAR && cg * MPAR + l < in.c; l++) begin
            cs.push_back(cg * MPAR + l); ys.push_back(y); xs.push_back(x);
          end
    for (int g = 0; g * NPE < nout; g++)
      for (int i = 0; i < cs.size(); i++) begin
        step_t st;
        st.waddr = wbase + g * cs.size() + i;
        st.slot  = -1;
        st.lane  = cs[i] % MPAR;
        st.first = (i == 0);
        st.last  = (i == cs.size() - 1);
        st.tag   = '{yo: '0, xo0: dim_t'(g * WPAR), mg: '0};
        for (int b = 0; b < WPAR; b++) st.bank_addr[b] = -1;
        st.bank_addr[net.fm_bank(in, xs[i])] = net.fm_addr(in, cs[i], ys[i], xs[i]);
        for (int w = 0; w < WPAR; w++) st.col_bank[w] = net.fm_bank(in, xs[i]);
        steps.push_back(st);
      end
  endtask

  // checker
  int     nstep = 0;
  step_t  cur, prev;
  bit     have_prev = 0;
  st_tag_t tag_q [$];
  int     tag_due [$];
  int     cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // stage B: controls of the previous step
    if (have_prev) begin
      checks++;
      if (!pe_en || pe_first != prev.first || pe_last != prev.last ||
          (prev.slot >= 0 && int'(wslot) != prev.slot) ||
          (prev.lane >= 0 && int'(lane) != prev.lane)) begin
        failures++;
        if (failures < 10) $display("step %0d: control mismatch", nstep - 1);
      end
      for (int w = 0; w < WPAR; w++) begin
        checks++;
        if (prev.col_bank[w] < 0 ? col_valid[w]
            : (!col_valid[w] || (mix_mode != MIX_FC && (w + int'(rot)) % WPAR != prev.col_bank[w])
                             || (mix_mode == MIX_FC && int'(rot) != prev.col_bank[w]))) begin
          failures++;
          if (failures < 10) $display("step %0d: column %0d routing wrong", nstep - 1, w);
        end
      end
      if (prev.last) begin
        tag_q.push_back(prev.tag);
        tag_due.push_back(cyc + QUANT_STAGES);
      end
    end else if (pe_en) begin
      failures++;
      $display("unexpected pe_en");
    end
    have_prev = 0;
    // stage A: addresses of the current step
    if (fm_re) begin
      if (steps.size() == 0) begin
        failures++;
        $display("more steps than expected");
      end else begin
        cur = steps.pop_front();
        checks++;
        if (!w_re || int'(w_raddr) != cur.waddr) begin
          failures++;
          if (failures < 10) $display("step %0d: weights address %0d exp %0d", nstep, w_raddr, cur.waddr);
        end
        for (int b = 0; b < WPAR; b++)
          if (cur.bank_addr[b] >= 0) begin
            checks++;
            if (int'(fm_raddr[b]) != cur.bank_addr[b]) begin
              failures++;
              if (failures < 10) $display("step %0d bank %0d: address %0d exp %0d", nstep, b,
                                          fm_raddr[b], cur.bank_addr[b]);
            end
          end
        prev = cur; have_prev = 1; nstep++;
      end
    end
    // storing-stage tags
    if (st_valid) begin
      checks++;
      if (tag_q.size() == 0 || tag_due[0] != cyc || st_tag != tag_q[0]) begin
        failures++;
        if (failures < 10) $display("storing tag wrong or mistimed at cycle %0d", cyc);
      end
      if (tag_q.size() != 0) begin void'(tag_q.pop_front()); void'(tag_due.pop_front()); end
    end
  end

  initial begin
    tensor_t t0, t1, t2, t3;
    bytes_t d0, d1, d2, d3;
    int wb1, wb2, wb3, total;
    net = new(WPAR, MPAR, 1 << FAW, 1 << WAW);
    t0 = net.new_tensor(3, 5, 7);
    d0 = net.input_tensor(t0);
    wb1 = net.whead + HDR_WORDS;
    t1 = net.add_conv(L_CONV, t0, d0, 3, 3, 3, 1, 1, 0, 1, 1, 0, d1);
    wb2 = net.whead + HDR_WORDS;
    t2 = net.add_conv(L_DW, t1, d1, 0, 2, 3, 0, 1, 1, 0, 1, 0, d2);
    wb3 = net.whead + HDR_WORDS;
    t3 = net.add_fc(t2, d2, 7, 0, 1, 0, d3);
    net.finish();
    gen_conv(L_CONV, t0, 3, 3, 3, 1, 1, wb1);
    gen_conv(L_DW, t1, 0, 2, 3, 0, 1, wb2);
    gen_fc(t2, 7, wb3);
    total = steps.size();
    checks++;
    if (longint'(total) != net.exp_steps) begin
      failures++;
      $display("step list %0d differs from the latency formula %0d", total, net.exp_steps);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < net.whead; a++) begin
      host_we <= 1; host_addr <= WAW'(a);
      for (int j = 0; j < NPE; j++) host_wdata[j*8 +: 8] <= net.wmem[a * NPE + j];
      @(posedge clk);
    end
    host_we <= 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (nstep != total || steps.size() != 0 || tag_q.size() != 0 || busy) begin
      failures++;
      $display("ran %0d of %0d steps, %0d tags pending", nstep, total, tag_q.size());
    end
    $display("steps %0d (formula %0d)", nstep, net.exp_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
