// tb_soc_fpga_top: end-to-end test of the FPGA side of a remote-controlled SoC-FPGA agent.
// The testbench plays the two software agents around the FPGA: a PC that sends packets and
// checks what comes back, and the processor firmware that decodes each packet and drives the
// ComBlock through its processor-side port. Packets use the common format: two header words
// (keyword, protocol, type, priority; destination and source IDs), payload, trailer keyword.
//   command packet   payload = command code, written to the command register
//   raw data packet  payload = dst_addr, dst_inc, N, N data words, checksum (sum of the data)
//   UDMA packet      payload = src_addr, dst_addr, src_inc, dst_inc, N
// Addresses in region 0x8000 belong to the PC's memory domain; a UDMA packet reading the FPGA
// into that region makes the firmware return a raw data packet.
// Everything runs at the top's default sizes. It runs the reference test application (PC
// data written into the BRAM through the FIFO, read back through the FIFO) over the whole BRAM,
// repeats it at sizes 1, 31, 32, 33 and 100 words, then BRAM <-> TDPRAM and user-port
// transfers, and the STOP, RESET and bus-error paths. It
// counts every mechanism and fails if one never happened: FIFO-empty stalls, FIFO-full stalls,
// each packet type, each command, bus errors, TDPRAM and user-port traffic.
module tb_soc_fpga_top;
  import udma_pkg::*;
  localparam int unsigned BRAM_WORDS = 1024, FIFO_WORDS = 32, RAM_WORDS = 1024;
  localparam int unsigned HAW = $clog2(RAM_WORDS) + 1;
  localparam logic [15:0] PC_REGION = 16'h8000;
  localparam int app_sizes [5] = '{1, 31, 32, 33, 100};
  localparam int unsigned FW_LATENCY = 200;  // cycles before the firmware services the FIFOs
  localparam logic [15:0] ID_PC = 16'h0002, ID_SOC = 16'h0001;

  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_we = 0, host_rvalid;
  logic [HAW-1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic [NUM_REGS-1:2][31:0] user_ireg;
  wb_req_t user_req;
  wb_rsp_t user_rsp;

  soc_fpga_top dut (.clk, .rst_n, .host_valid, .host_we, .host_addr, .host_wdata, .host_rdata,
                    .host_rvalid, .user_ireg, .user_wb_req(user_req), .user_wb_rsp(user_rsp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- user WB slave (application)
  logic [31:0] user_mem [64];
  always_ff @(posedge clk) begin
    if (!rst_n) user_rsp <= '0;
    else begin
      user_rsp.ack <= user_req.cyc & user_req.stb & ~user_rsp.ack;
      if (user_req.cyc && user_req.stb && !user_rsp.ack) begin
        if (user_req.we) user_mem[user_req.adr[5:0]] <= user_req.dat;
        user_rsp.dat <= user_mem[user_req.adr[5:0]];
      end
    end
  end

  // ---------------------------------------------------------------- event counters
  int n_empty_stall = 0, n_full_stall = 0, n_tdpram = 0, n_user = 0, n_err = 0;
  int n_pkt_cmd = 0, n_pkt_raw = 0, n_pkt_udma = 0, n_cmd_start = 0, n_cmd_stop = 0, n_cmd_reset = 0;
  int busy_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cb.fifo_wb_req.stb && !dut.u_cb.fifo_wb_req.we && !dut.u_cb.fifo_ack_q && dut.u_cb.in_empty)
      n_empty_stall++;
    if (dut.u_cb.fifo_wb_req.stb && dut.u_cb.fifo_wb_req.we && !dut.u_cb.fifo_ack_q && dut.u_cb.out_full)
      n_full_stall++;
    if (dut.s_rsp[SLV_TDPRAM].ack) n_tdpram++;
    if (user_rsp.ack) n_user++;
    if (dut.m_rsp.err) n_err++;
    if (dut.status.busy) busy_cycles++;
  end

  // ---------------------------------------------------------------- processor-side bus
  task automatic hwrite(logic [HAW-1:0] a, logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_valid = 0; host_we = 0;
  endtask

  task automatic hread(logic [HAW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    host_valid = 1; host_we = 0; host_addr = a;
    @(posedge clk); #1;
    host_valid = 0;
    d = host_rdata;
  endtask

  // ---------------------------------------------------------------- packets
  typedef logic [31:0] pkt_t[$];

  function automatic pkt_t make_pkt(pkt_type_e t, logic [15:0] dst, logic [15:0] src, pkt_t payload);
    pkt_t p;
    pkt_hdr0_t h0;
    pkt_hdr1_t h1;
    h0 = '{keyword: HEADER_KEYWORD, protocol: PROTOCOL_NUMBER, ptype: t, priority_lvl: 4'd0};
    h1 = '{dst_id: dst, src_id: src};
    p.push_back(h0);
    p.push_back(h1);
    foreach (payload[i]) p.push_back(payload[i]);
    p.push_back(TRAILER_KEYWORD);
    return p;
  endfunction

  function automatic logic [31:0] checksum(pkt_t words);
    logic [31:0] s = '0;
    foreach (words[i]) s += words[i];
    return s;
  endfunction

  // ---------------------------------------------------------------- PC-side memory domain
  logic [31:0] pc_mem [4096];

  // ---------------------------------------------------------------- firmware model
  // the FPGA's memory domain is everything below the PC's region
  function automatic bit in_fpga(logic [31:0] a);
    return a[31:16] < PC_REGION;
  endfunction

  task automatic fw_issue(udma_cmd_e c);
    hwrite(HAW'(OREG_CMD), 32'(c));
    if (c == CMD_START) n_cmd_start++;
    if (c == CMD_STOP)  n_cmd_stop++;
    if (c == CMD_RESET) n_cmd_reset++;
  endtask

  task automatic fw_load(logic [31:0] s, logic [31:0] d, logic [31:0] si, logic [31:0] di, logic [31:0] n);
    hwrite(HAW'(OREG_SRC_ADDR), s);
    hwrite(HAW'(OREG_DST_ADDR), d);
    hwrite(HAW'(OREG_SRC_INC), si);
    hwrite(HAW'(OREG_DST_INC), di);
    hwrite(HAW'(OREG_N_WORDS), n);
  endtask

  // Run a loaded instruction; feed `push_words` into the in FIFO as space allows and drain the
  // out FIFO into `pulled` until the processor is idle and `pull_n` words have been read.
  task automatic fw_run(pkt_t push_words, int pull_n, output pkt_t pulled, output udma_status_t st);
    logic [31:0] d, fstat;
    int k = 0;
    pulled = {};
    fw_issue(CMD_START);
    // the firmware attends to the FIFOs only some time after starting the processor
    repeat (FW_LATENCY) @(posedge clk);
    forever begin
      hread(HAW'(HOST_FIFO_STAT), fstat);
      while (k < push_words.size() && !fstat[1]) begin
        hwrite(HAW'(HOST_FIFO_DATA), push_words[k]);
        k++;
        hread(HAW'(HOST_FIFO_STAT), fstat);
      end
      while (pulled.size() < pull_n && !fstat[2]) begin
        hread(HAW'(HOST_FIFO_DATA), d);
        pulled.push_back(d);
        hread(HAW'(HOST_FIFO_STAT), fstat);
      end
      hread(HAW'(16 + IREG_STATUS), d);
      st = udma_status_t'(d);
      if (!st.busy && pulled.size() >= pull_n) break;
      if (!st.busy && (st.stopped || st.error)) break;
    end
  endtask

  task automatic fw_handle(pkt_t p, output udma_status_t st);
    pkt_hdr0_t h0;
    pkt_hdr1_t h1;
    pkt_t pay, got, none;
    st = '0;
    h0 = p[0];
    h1 = p[1];
    check(h0.keyword == HEADER_KEYWORD && h0.protocol == PROTOCOL_NUMBER && p[$] == TRAILER_KEYWORD,
          "firmware: packet framing");
    check(h1.dst_id == ID_SOC, "firmware: packet addressed to this agent");
    pay = p[2:$-1];
    case (pkt_type_e'(h0.ptype))
      PKT_COMMAND: begin
        n_pkt_cmd++;
        fw_issue(udma_cmd_e'(pay[0][1:0]));
      end
      PKT_RAW_DATA: begin
        logic [31:0] n;
        pkt_t data;
        n_pkt_raw++;
        n = pay[2];
        for (int i = 0; i < int'(n); i++) data.push_back(pay[3 + i]);
        check(checksum(data) == pay[3 + n], "firmware: raw data checksum");
        fw_load(32'h0001_0000, pay[0], 0, pay[1], n);
        fw_run(data, 0, got, st);
      end
      PKT_UDMA: begin
        n_pkt_udma++;
        if (in_fpga(pay[0]) && in_fpga(pay[1])) begin
          fw_load(pay[0], pay[1], pay[2], pay[3], pay[4]);
          fw_run(none, 0, got, st);
        end else if (in_fpga(pay[0])) begin
          // FPGA -> PC: move through the out FIFO, then send a raw data packet to the PC
          pkt_t rp;
          fw_load(pay[0], 32'h0001_0000, pay[2], 0, pay[4]);
          fw_run(none, int'(pay[4]), got, st);
          rp.push_back(pay[1]);
          rp.push_back(pay[3]);
          rp.push_back(pay[4]);
          foreach (got[i]) rp.push_back(got[i]);
          rp.push_back(checksum(got));
          pc_receive(make_pkt(PKT_RAW_DATA, ID_PC, ID_SOC, rp));
        end
      end
      default: check(0, "firmware: unknown packet type");
    endcase
  endtask

  // PC receives a raw data packet and writes it into its memory domain
  int pc_raw_in = 0;
  task automatic pc_receive(pkt_t p);
    pkt_hdr0_t h0;
    pkt_t pay, data;
    logic [31:0] a, n;
    h0 = p[0];
    check(h0.keyword == HEADER_KEYWORD && p[$] == TRAILER_KEYWORD && h0.ptype == PKT_RAW_DATA,
          "PC: raw data packet framing");
    pay = p[2:$-1];
    a = pay[0];
    n = pay[2];
    for (int i = 0; i < int'(n); i++) data.push_back(pay[3 + i]);
    check(checksum(data) == pay[3 + n], "PC: checksum");
    for (int i = 0; i < int'(n); i++) begin
      pc_mem[a[11:0]] = data[i];
      a += pay[1];
    end
    pc_raw_in++;
  endtask

  // ---------------------------------------------------------------- PC-side operations
  task automatic pc_write(logic [31:0] dst, logic [31:0] dinc, pkt_t data, output udma_status_t st);
    pkt_t pay;
    pay.push_back(dst);
    pay.push_back(dinc);
    pay.push_back(data.size());
    foreach (data[i]) pay.push_back(data[i]);
    pay.push_back(checksum(data));
    fw_handle(make_pkt(PKT_RAW_DATA, ID_SOC, ID_PC, pay), st);
  endtask

  task automatic pc_udma(logic [31:0] s, logic [31:0] d, logic [31:0] si, logic [31:0] di,
                         logic [31:0] n, output udma_status_t st);
    pkt_t pay;
    pay = '{s, d, si, di, n};
    fw_handle(make_pkt(PKT_UDMA, ID_SOC, ID_PC, pay), st);
  endtask

  task automatic pc_command(udma_cmd_e c);
    pkt_t pay;
    udma_status_t st;
    pay = '{32'(c)};
    fw_handle(make_pkt(PKT_COMMAND, ID_SOC, ID_PC, pay), st);
  endtask

  // ---------------------------------------------------------------- scenario
  initial begin
    pkt_t data, data2;
    udma_status_t st;
    logic [31:0] d, cnt;
    int b0;
    user_ireg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. test application over the whole BRAM: PC -> FIFO -> BRAM, then BRAM -> FIFO -> PC
    for (int i = 0; i < BRAM_WORDS; i++) data.push_back($urandom);
    pc_write(32'h0000_0000, 1, data, st);
    check(st.done && !st.error, "PC data written into BRAM");
    hread(HAW'(16 + IREG_COUNT), cnt);
    check(cnt == BRAM_WORDS, $sformatf("words moved %0d", cnt));
    pc_udma(32'h0000_0000, {PC_REGION, 16'h0000}, 1, 1, BRAM_WORDS, st);
    check(st.done, "BRAM read back to PC");
    check(pc_raw_in == 1, "PC received one raw data packet");
    begin
      int bad = 0;
      for (int i = 0; i < BRAM_WORDS; i++) if (pc_mem[i] != data[i]) bad++;
      check(bad == 0, $sformatf("BRAM contents verified from PC (%0d bad)", bad));
    end

    // 1b. the same application at sizes around the FIFO depth, at an offset in the BRAM
    foreach (app_sizes[k]) begin
      automatic int n = app_sizes[k];
      automatic logic [31:0] base = 32'(700 + k);
      pkt_t chunk;
      for (int i = 0; i < n; i++) chunk.push_back($urandom);
      pc_write(base, 1, chunk, st);
      check(st.done, $sformatf("%0d words written", n));
      pc_udma(base, {PC_REGION, 16'h0C00}, 1, 1, n, st);
      begin
        int bad = 0;
        for (int i = 0; i < n; i++) if (pc_mem[12'hC00 + i] != chunk[i]) bad++;
        check(bad == 0, $sformatf("%0d words read back (%0d bad)", n, bad));
      end
      for (int i = 0; i < n; i++) data[700 + k + i] = chunk[i];
    end

    // 2. BRAM -> TDPRAM inside the FPGA, cycle count 4*N, processor reads through port B
    b0 = busy_cycles;
    pc_udma(32'h0000_0010, 32'h0002_0100, 1, 1, 64, st);
    check(st.done, "BRAM to TDPRAM");
    check(busy_cycles - b0 == 4 * 64, $sformatf("64 words in %0d busy cycles, expected 256", busy_cycles - b0));
    for (int i = 0; i < 64; i++) begin
      hread(HAW'(RAM_WORDS + 256 + i), d);
      check(d == data[16 + i], "TDPRAM word read by processor");
    end

    // 3. processor writes TDPRAM, UDMA scatters it to the user port (stride 2), then back to BRAM
    for (int i = 0; i < 16; i++) hwrite(HAW'(RAM_WORDS + i), 32'hB000_0000 + 32'(i));
    pc_udma(32'h0002_0000, 32'h0003_0000, 1, 2, 16, st);
    check(st.done, "TDPRAM to user port");
    for (int i = 0; i < 16; i++) check(user_mem[2 * i] == 32'hB000_0000 + 32'(i), "user port word");
    pc_udma(32'h0003_0000, 32'h0000_0300, 2, 1, 16, st);
    pc_udma(32'h0000_0300, {PC_REGION, 16'h0800}, 1, 1, 16, st);
    for (int i = 0; i < 16; i++) check(pc_mem[12'h800 + i] == 32'hB000_0000 + 32'(i), "round trip via user port");

    // 4. STOP command packet while the processor waits on an empty FIFO
    fw_load(32'h0001_0000, 32'h0000_0000, 0, 1, 8);
    fw_issue(CMD_START);
    hwrite(HAW'(HOST_FIFO_DATA), 32'h1111_1111);
    hwrite(HAW'(HOST_FIFO_DATA), 32'h2222_2222);
    repeat (20) @(posedge clk);
    hread(HAW'(16 + IREG_STATUS), d);
    st = udma_status_t'(d);
    check(st.busy, "stalled on empty FIFO");
    pc_command(CMD_STOP);
    for (int i = 0; i < 4; i++) begin  // the engine may spend one drain cycle after STOP
      hread(HAW'(16 + IREG_STATUS), d);
      st = udma_status_t'(d);
      if (!st.busy) break;
    end
    check(!st.busy && st.stopped && !st.done, "STOP ends the transfer");
    hread(HAW'(16 + IREG_COUNT), cnt);
    check(cnt == 2, $sformatf("two words moved before STOP (%0d)", cnt));

    // 5. RESET command packet clears status
    pc_command(CMD_RESET);
    hread(HAW'(16 + IREG_STATUS), d);
    check(d == 0, "RESET clears status");
    hread(HAW'(16 + IREG_COUNT), cnt);
    check(cnt == 0, "RESET clears count");

    // 6. START command packet re-runs the loaded instruction (a BRAM -> BRAM copy)
    fw_load(32'h0000_0000, 32'h0000_0200, 1, 1, 4);
    pc_command(CMD_START);
    repeat (30) @(posedge clk);
    hread(HAW'(16 + IREG_STATUS), d);
    st = udma_status_t'(d);
    check(st.done, "START command");
    pc_udma(32'h0000_0200, {PC_REGION, 16'h0900}, 1, 1, 4, st);
    // BRAM words 0 and 1 were overwritten by the two words moved before STOP
    check(pc_mem[12'h900] == 32'h1111_1111 && pc_mem[12'h901] == 32'h2222_2222, "copy started by command");
    for (int i = 2; i < 4; i++) check(pc_mem[12'h900 + i] == data[i], "copy started by command");

    // 7. unmapped address: bus error reported in status
    pc_udma(32'h0000_0000, 32'h0100_0000, 1, 1, 4, st);
    check(st.error && !st.done && !st.busy, "bus error on unmapped destination");

    // 8. user input registers reach the processor
    user_ireg[5] = 32'h0BAD_F00D;
    hread(HAW'(16 + 5), d);
    check(d == 32'h0BAD_F00D, "user input register");

    // mechanisms
    $display("stalls: empty %0d full %0d; packets cmd %0d raw %0d udma %0d; commands start %0d stop %0d reset %0d; tdpram %0d user %0d err %0d",
             n_empty_stall, n_full_stall, n_pkt_cmd, n_pkt_raw, n_pkt_udma, n_cmd_start, n_cmd_stop,
             n_cmd_reset, n_tdpram, n_user, n_err);
    check(n_empty_stall > 0, "FIFO-empty stall happened");
    check(n_full_stall > 0, "FIFO-full stall happened");
    check(n_pkt_cmd > 0 && n_pkt_raw > 0 && n_pkt_udma > 0, "all packet types used");
    check(n_cmd_start > 0 && n_cmd_stop > 0 && n_cmd_reset > 0, "all commands used");
    check(n_tdpram > 0 && n_user > 0 && n_err > 0, "TDPRAM, user port and bus error used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
