// Test support for the list processors: builds a memory image holding a
// linked list and computes, by walking the image independently of the RTL,
// the node count and the expected wrapped sum.
//
// A node at address p occupies two words: Memory[p] is the address of the
// next node (0 ends the list) and Memory[p+1] is the value. The first node
// is at address 0. Node addresses are drawn at random (not aligned to two
// words) from the free space, and words outside the list hold random junk.
package tb_list_pkg;

  class list_image;
    bit [7:0] mem [256];
    int       n;
    bit [7:0] sum;
    bit [7:0] node [$];  // node addresses in list order

    // Walk the list the way the algorithm describes and return count/sum.
    function void walk();
      bit [7:0] p;
      n   = 0;
      sum = '0;
      p   = 8'd0;
      node.delete();
      do begin
        node.push_back(p);
        sum = sum + mem[8'(p + 1)];
        n++;
        p = mem[p];
      end while (p != 8'd0 && n < 200);
    endfunction

    // Random list of up to `nodes` nodes (1..120). Random placement can
    // fragment the free space; after 1000 misses the free space is scanned,
    // and if no free word pair is left the list ends with fewer nodes.
    function void build_random(int nodes);
      bit       used [256];
      bit [7:0] addr [$];
      int       p, tries;
      bit       full;
      foreach (mem[i]) begin
        mem[i]  = 8'($urandom);
        used[i] = 1'b0;
      end
      used[0] = 1'b1;
      used[1] = 1'b1;
      addr.push_back(8'd0);
      tries = 0;
      full  = 1'b0;
      while (addr.size() < nodes && !full) begin
        p = -1;
        if (tries < 1000) begin
          p = 2 + int'($urandom % 253);  // 2..254, so p+1 <= 255
          if (used[p] || used[p+1]) p = -1;
          tries++;
        end else begin
          for (int q = 2; q < 255; q++)
            if (p < 0 && !used[q] && !used[q+1]) p = q;
          full = (p < 0);
        end
        if (p >= 0) begin
          used[p]   = 1'b1;
          used[p+1] = 1'b1;
          addr.push_back(8'(p));
        end
      end
      for (int k = 0; k < addr.size(); k++) begin
        mem[addr[k]]         = (k == addr.size() - 1) ? 8'd0 : addr[k+1];
        mem[8'(addr[k] + 1)] = 8'($urandom);
      end
      walk();
    endfunction

    // The four-node example list: nodes at 0x00, 0x05, 0x0E, 0x0A.
    function void build_example(bit [7:0] x0, bit [7:0] x1, bit [7:0] x2, bit [7:0] x3);
      foreach (mem[i]) mem[i] = 8'($urandom);
      mem[8'h00] = 8'h05; mem[8'h01] = x0;
      mem[8'h05] = 8'h0E; mem[8'h06] = x1;
      mem[8'h0E] = 8'h0A; mem[8'h0F] = x2;
      mem[8'h0A] = 8'h00; mem[8'h0B] = x3;
      walk();
    endfunction
  endclass

endpackage
