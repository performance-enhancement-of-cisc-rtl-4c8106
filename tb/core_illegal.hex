74 5A A5 04 F5 10 00 00
