// ni_fw_pkg: protocol programs for the two NI cores (AAL5), used by the
// unit and top-level test benches.
//
// rep_aal5 : reassembly program. Fills the circulation buffer with NSLOTS
//            cell-slot pointers (slot i at CRB word 13*(i+1): 12 payload words
//            and the next-slot pointer). For each cell in the RBI it reads the
//            header and one word each from FIFO3 (new connection) and FIFO4
//            (freed slot), then starts the DMA that moves the payload to the
//            free slot taken from the CB head. While the DMA owns the bus the
//            program does only register and CAM work: it inserts the new
//            connection, looks the cell's connection up (the key is the header
//            with PT and CLP cleared) and decides the cell's kind. A cell whose
//            VCI (low 12 bits) is 5 or less is a signalling cell: {key, slot}
//            goes to FIFO1. A cell with no CAM entry is discarded. Otherwise it
//            is linked as BOM / COM (Start-address in the CAM zero or not, PT
//            end bit clear) or closes the PDU as SSM / EOM, and {key,
//            Start-address} goes to FIFO2. After the transfer it writes the
//            slot's NULL pointer, releases the RBI buffer, fetches the next
//            free slot, appends the freed slot to the CB tail, and sets the
//            host interrupt while 10% or fewer of the slots are free. About
//            40 core cycles per cell.
// sep_aal5 : segmentation program. Takes {header, CSB address, cell count}
//            from FIFO5; for each cell starts the DMA (12 words CSB -> SBI)
//            and writes the header to the SBI, with the PT end bit (value 2)
//            set on the last cell. Seven instructions per cell; the header
//            store waits for the DMA, so a cell takes about 12 core cycles.
package ni_fw_pkg;

  import ni_asm_pkg::*;

  localparam int RBI  = 32'h10000;
  localparam int CB   = 32'h20000;
  localparam int FIFO = 32'h30000;
  localparam int DMA  = 32'h40000;
  localparam int SBI  = 32'h10000;

  function automatic void rep_aal5(ni_asm a, int nslots, int cb_mask);
    for (int p = 0; p < 2; p++) begin
      a.start_pass(p == 1);
      // ---- set-up ----
      a.li(1, RBI);
      a.li(2, CB);
      a.li(3, FIFO);
      a.li(4, DMA);
      a.addi(18, 1, 1);             // RBI payload address
      a.addi(22, 0, -1);            // CAM miss value
      a.li(13, nslots / 10);        // interrupt threshold (free slots)
      a.addi(5, 0, 0);              // CB head index
      a.li(7, nslots);              // CB tail index
      a.addi(8, 0, 13);             // first slot address
      a.addi(9, 0, 0);
      a.li(12, nslots - 1);
      a.label("fill");
      a.add (11, 2, 9);
      a.addi(9, 9, 1);
      a.sw  (8, 0, 11);
      a.ble (9, 12, "fill");
      a.addi(8, 8, 13);             // delay slot
      a.add (15, 2, 5);             // &CB[head]
      a.nop ();
      a.lw  (14, 0, 15);            // first free slot
      // ---- wait for a cell ----
      a.label("poll");
      a.lw  (6, 15, 1);             // RBI status
      a.beqi(6, 0, "poll");
      a.lw  (6, 0, 1);              // delay slot: header
      a.lw  (25, 2, 3);             // FIFO3: new connection or 0
      a.lw  (26, 3, 3);             // FIFO4: freed slot or 0
      a.sw  (18, 0, 4);             // DMA source
      a.sw  (14, 1, 4);             // DMA destination: start
      // ---- while the DMA owns the bus: no loads or stores ----
      a.andi(16, 6, 16'h000F);      // PT and CLP
      a.andi(20, 6, 16'hFFF0);      // VCI, low 12 bits
      a.sub (17, 6, 16);            // connection key
      a.beq (25, 0, "noconn");
      a.andi(21, 6, 16'h0002);      // delay slot: end-of-message bit
      a.cam_insert(25);
      a.label("noconn");
      a.lcam_start(19, 17);
      a.sub (10, 7, 5);             // free slots (before this cell)
      a.add (9, 2, 7);              // &CB[tail]
      a.blei(20, 8'h50, "signal");
      a.lcam_end(24, 17);           // delay slot
      a.beq (19, 22, "lost");
      a.addi(23, 14, 12);           // delay slot: node pointer word
      a.bgei(21, 1, "last");
      a.addi(5, 5, 1);              // delay slot: slot taken
      a.beq (19, 0, "bom");
      a.andi(5, 5, cb_mask);        // delay slot
      // COM
      a.cam_wr_end(17, 23);
      a.jmp ("common");
      a.sw  (14, 0, 24);            // delay slot: previous node -> this slot
      a.label("bom");
      a.cam_wr_start(17, 14);
      a.jmp ("common");
      a.cam_wr_end(17, 23);         // delay slot
      a.label("last");
      a.beq (19, 0, "ssm");
      a.andi(5, 5, cb_mask);        // delay slot
      // EOM
      a.cam_wr_start(17, 0);        // next cell on this connection starts a PDU
      a.sw  (14, 0, 24);
      a.sw  (17, 1, 3);             // FIFO2: key
      a.jmp ("common");
      a.sw  (19, 1, 3);             // delay slot: FIFO2: Start-address
      a.label("ssm");
      a.sw  (17, 1, 3);
      a.jmp ("common");
      a.sw  (14, 1, 3);             // delay slot
      a.label("lost");
      a.jmp ("common");             // the slot stays free; its pointer word is
      a.nop ();                     // cleared again below, which is harmless
      a.label("signal");
      a.addi(23, 14, 12);
      a.addi(5, 5, 1);
      a.andi(5, 5, cb_mask);
      a.sw  (17, 0, 3);             // FIFO1: key
      a.sw  (14, 0, 3);             // FIFO1: slot
      // ---- after the payload has moved ----
      a.label("common");
      a.sw  (0, 0, 23);             // NULL at the end of the node
      a.add (15, 2, 5);             // &CB[head]
      a.sw  (0, 15, 1);             // release the RBI buffer
      a.lw  (14, 0, 15);            // next free slot
      a.beq (26, 0, "nofree");
      a.andi(10, 10, cb_mask);      // delay slot
      a.sw  (26, 0, 9);             // freed slot to the CB tail
      a.addi(7, 7, 1);
      a.andi(7, 7, cb_mask);
      a.label("nofree");
      a.ble (10, 13, "irq");
      a.addi(8, 0, 1);              // delay slot
      a.addi(8, 0, 0);
      a.label("irq");
      a.jmp ("poll");
      a.sw  (8, 5, 3);              // delay slot: host interrupt line
    end
  endfunction

  function automatic void sep_aal5(ni_asm a);
    for (int p = 0; p < 2; p++) begin
      a.start_pass(p == 1);
      a.li(1, SBI);
      a.li(3, FIFO);
      a.li(4, DMA);
      a.addi(2, 1, 1);              // SBI payload address
      a.label("poll");
      a.lw  (5, 4, 3);              // header template or 0
      a.beq (5, 0, "poll");
      a.nop ();
      a.lw  (6, 4, 3);              // CSB address
      a.lw  (7, 4, 3);              // cell count
      a.addi(9, 5, 2);              // header of the last cell: PT end bit
      a.sw  (6, 0, 4);              // DMA source of the first cell
      a.label("loop");
      a.sw  (2, 1, 4);              // DMA destination: start
      a.addi(7, 7, -1);
      a.beq (7, 0, "lastc");
      a.addi(6, 6, 12);             // delay slot: next CSB address
      a.sw  (5, 0, 1);              // header (PT = 0) completes the cell
      a.jmp ("loop");
      a.sw  (6, 0, 4);              // delay slot: DMA source of the next cell
      a.label("lastc");
      a.sw  (9, 0, 1);              // last cell's header
      a.jmp ("poll");
      a.nop ();
    end
  endfunction

endpackage
